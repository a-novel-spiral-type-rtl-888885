// tb_pe_array16x16: self-checking test of the full 16x16 array. A 16x16
// model of Cur and Ref follows the same random mode sequence, with the
// reference word entering the edge chosen by the mode; all sixteen 4x4 SADs
// (z-order) are checked one cycle after the window they belong to.
module tb_pe_array16x16;
  import me_pkg::*;

  logic clk = 1'b0;
  pe_mode_t mode;
  word_t cw, rw;
  logic [15:0][SAD4_W-1:0] sad;
  int checks = 0, failures = 0;
  int mc [16][16], mr [16][16], nr [16][16];
  int exp_s [16], prev_s [16];

  pe_array16x16 dut (.clk, .mode, .cur_word(cw), .ref_word(rw), .sad4x4(sad));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(word_t w, int j);
    return int'(w[8*j +: 8]);
  endfunction

  task automatic step(pe_mode_t m);
    mode = m;
    cw = {$urandom, $urandom, $urandom, $urandom};
    rw = {$urandom, $urandom, $urandom, $urandom};
    @(posedge clk);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        unique case (m)
          PE_LOAD, PE_FROM_TOP: nr[r][c] = (r == 0)  ? px(rw, c) : mr[r-1][c];
          PE_FROM_BOTTOM:       nr[r][c] = (r == 15) ? px(rw, c) : mr[r+1][c];
          PE_FROM_LEFT:         nr[r][c] = (c == 0)  ? px(rw, r) : mr[r][c-1];
          PE_FROM_RIGHT:        nr[r][c] = (c == 15) ? px(rw, r) : mr[r][c+1];
          default:              nr[r][c] = mr[r][c];
        endcase
    if (m == PE_LOAD)
      for (int r = 15; r >= 0; r--)
        for (int c = 0; c < 16; c++) mc[r][c] = (r == 0) ? px(cw, c) : mc[r-1][c];
    mr = nr;
    prev_s = exp_s;
    for (int b = 0; b < 16; b++) exp_s[b] = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int b = (r/8)*8 + (c/8)*4 + ((r/4)%2)*2 + ((c/4)%2);
        exp_s[b] += (mc[r][c] > mr[r][c]) ? mc[r][c] - mr[r][c] : mr[r][c] - mc[r][c];
      end
    #1;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin exp_s[i] = 0; prev_s[i] = 0; end
    for (int i = 0; i < 16; i++) step(PE_LOAD);
    step(PE_HOLD);
    for (int n = 0; n < 1500; n++) begin
      step(pe_mode_t'($urandom_range(0, 5)));
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (int'(sad[b]) != prev_s[b]) begin
          failures++;
          if (failures < 10) $display("cycle %0d block %0d: %0d vs %0d", n, b, sad[b], prev_s[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
