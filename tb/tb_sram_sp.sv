// tb_sram_sp: self-checking test of the single-port SRAM: random writes and
// reads against an array model, checking the one-cycle read latency and that
// rdata holds during writes and idle cycles.
module tb_sram_sp;
  localparam int D = 96, W = 128;
  logic clk = 1'b0, en, we;
  logic [6:0] addr;
  logic [W-1:0] wdata, rdata, model [D], exp_q;
  logic [D-1:0] known;
  int checks = 0, failures = 0;

  sram_sp #(.DEPTH(D), .WIDTH(W)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known = '0; en = 0; we = 0; addr = 0; wdata = 0; exp_q = '0;
    // fill every word
    for (int a = 0; a < D; a++) begin
      en = 1; we = 1; addr = 7'(a);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wdata;
      @(posedge clk); #1;
    end
    // one read so that rdata is defined
    en = 1; we = 0; addr = 7'd0;
    @(posedge clk); #1;
    exp_q = model[0];
    for (int i = 0; i < 5000; i++) begin
      int op; op = $urandom_range(0, 3);
      addr = 7'($urandom_range(0, D-1));
      wdata = {$urandom, $urandom, $urandom, $urandom};
      en = (op != 0); we = (op == 1);
      @(posedge clk);
      if (en && !we) exp_q = model[addr];
      if (en && we) model[addr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d", addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
