// tb_pe_array4x4: self-checking test of one 4x4 PE tile. A model of the
// 4x4 Cur and Ref registers is updated with the same random modes and edge
// inputs; the tile's edge outputs are compared every cycle, and sad4x4 is
// compared with the model SAD of the window held one cycle earlier.
module tb_pe_array4x4;
  import me_pkg::*;

  logic clk = 1'b0;
  pe_mode_t mode;
  pix_t [3:0] cin, rin_t, rin_b, rin_l, rin_r, cout_b, rout_t, rout_b, rout_l, rout_r;
  logic [SAD4_W-1:0] sad;
  int checks = 0, failures = 0;
  int mc [4][4], mr [4][4], nr [4][4];
  int exp_sad, prev_sad;

  pe_array4x4 dut (.clk, .mode, .cur_in_top(cin), .ref_in_top(rin_t), .ref_in_bottom(rin_b),
    .ref_in_left(rin_l), .ref_in_right(rin_r), .cur_out_bottom(cout_b), .ref_out_top(rout_t),
    .ref_out_bottom(rout_b), .ref_out_left(rout_l), .ref_out_right(rout_r), .sad4x4(sad));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_sad();
    int s = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        s += (mc[r][c] > mr[r][c]) ? mc[r][c] - mr[r][c] : mr[r][c] - mc[r][c];
    return s;
  endfunction

  task automatic step(pe_mode_t m);
    mode = m;
    for (int i = 0; i < 4; i++) begin
      cin[i] = pix_t'($urandom); rin_t[i] = pix_t'($urandom); rin_b[i] = pix_t'($urandom);
      rin_l[i] = pix_t'($urandom); rin_r[i] = pix_t'($urandom);
    end
    @(posedge clk);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        unique case (m)
          PE_LOAD, PE_FROM_TOP: nr[r][c] = (r == 0) ? int'(rin_t[c]) : mr[r-1][c];
          PE_FROM_BOTTOM:       nr[r][c] = (r == 3) ? int'(rin_b[c]) : mr[r+1][c];
          PE_FROM_LEFT:         nr[r][c] = (c == 0) ? int'(rin_l[r]) : mr[r][c-1];
          PE_FROM_RIGHT:        nr[r][c] = (c == 3) ? int'(rin_r[r]) : mr[r][c+1];
          default:              nr[r][c] = mr[r][c];
        endcase
      end
    if (m == PE_LOAD)
      for (int r = 3; r >= 0; r--)
        for (int c = 0; c < 4; c++) mc[r][c] = (r == 0) ? int'(cin[c]) : mc[r-1][c];
    mr = nr;
    prev_sad = exp_sad;
    exp_sad = model_sad();
    #1;
  endtask

  initial begin
    exp_sad = 0;
    for (int i = 0; i < 4; i++) step(PE_LOAD);
    step(PE_HOLD);
    for (int n = 0; n < 3000; n++) begin
      step(pe_mode_t'($urandom_range(0, 5)));
      // edge outputs reflect the state after this edge
      checks++;
      for (int i = 0; i < 4; i++)
        if (int'(rout_t[i]) != mr[0][i] || int'(rout_b[i]) != mr[3][i] ||
            int'(rout_l[i]) != mr[i][0] || int'(rout_r[i]) != mr[i][3] ||
            int'(cout_b[i]) != mc[3][i]) begin
          failures++;
          if (failures < 10) $display("edge mismatch cycle %0d", n);
          break;
        end
      // sad4x4 lags the window by one cycle
      checks++;
      if (int'(sad) != prev_sad) begin
        failures++;
        if (failures < 10) $display("sad mismatch cycle %0d: %0d vs %0d", n, sad, prev_sad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
