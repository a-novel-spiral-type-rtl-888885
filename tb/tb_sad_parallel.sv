// tb_sad_parallel: self-checking test of the parallel SAD tree. Random 4x4
// SADs go in; every output SAD is compared with a sum over the 4x4 blocks
// that lie inside that partition, worked out from block coordinates. Also
// checks the one-cycle latency of out and out_valid.
module tb_sad_parallel;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, in_valid;
  logic [15:0][SAD4_W-1:0] s4;
  logic out_valid;
  sad_set_t o;
  int checks = 0, failures = 0;
  int bx [16], by [16];

  sad_parallel dut (.clk, .rst_n, .in_valid, .sad4x4(s4), .out_valid, .out(o));
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge before the first clock edge

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sum of the 4x4 SADs whose block lies in [x0,x1] x [y0,y1] (units of 4 px)
  function automatic int region(logic [15:0][SAD4_W-1:0] v, int x0, int x1, int y0, int y1);
    int s = 0;
    for (int i = 0; i < 16; i++)
      if (bx[i] >= x0 && bx[i] <= x1 && by[i] >= y0 && by[i] <= y1) s += int'(v[i]);
    return s;
  endfunction

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: %0d vs %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      // z-order: quadrant i/4, sub-position i%4
      bx[i] = ((i / 4) % 2) * 2 + (i % 2);
      by[i] = (i / 8) * 2 + ((i % 4) / 2);
    end
    in_valid = 0; s4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [15:0][SAD4_W-1:0] v;
      logic vin;
      for (int i = 0; i < 16; i++) v[i] = (n % 7 == 0) ? 12'hFF0 : SAD4_W'($urandom);
      vin = 1'($urandom);
      s4 = v; in_valid = vin;
      @(posedge clk); #1;
      chk(int'(out_valid), int'(vin), "valid");
      for (int i = 0; i < 16; i++) chk(int'(o.s4x4[i]), int'(v[i]), "4x4");
      for (int q = 0; q < 4; q++) begin
        automatic int qx = (q % 2) * 2, qy = (q / 2) * 2;
        for (int j = 0; j < 2; j++) begin
          chk(int'(o.s8x4[2*q+j]), region(v, qx, qx+1, qy+j, qy+j), "8x4");
          chk(int'(o.s4x8[2*q+j]), region(v, qx+j, qx+j, qy, qy+1), "4x8");
        end
        chk(int'(o.s8x8[q]), region(v, qx, qx+1, qy, qy+1), "8x8");
      end
      for (int h = 0; h < 2; h++) begin
        chk(int'(o.s16x8[h]), region(v, 0, 3, 2*h, 2*h+1), "16x8");
        chk(int'(o.s8x16[h]), region(v, 2*h, 2*h+1, 0, 3), "8x16");
      end
      chk(int'(o.s16x16), region(v, 0, 3, 0, 3), "16x16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
