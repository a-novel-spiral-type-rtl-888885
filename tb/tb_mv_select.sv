// tb_mv_select: self-checking test of best-match selection. Random SAD sets
// (with small values so that ties are frequent) are presented with random
// motion vectors; for every sub-block the kept SAD and vector are compared
// with a model that keeps the first strict minimum. clear is exercised
// between two runs.
module tb_mv_select;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, ev = 1'b0;
  mv_comp_t edx, edy;
  sad_set_t sads;
  sad_t     bsad [N_PART];
  mv_comp_t bdx  [N_PART], bdy [N_PART];
  int checks = 0, failures = 0, ties = 0;
  int msad [N_PART], mdx [N_PART], mdy [N_PART];

  mv_select dut (.clk, .rst_n, .clear, .eval_valid(ev), .eval_dx(edx), .eval_dy(edy),
                 .sads, .best_sad(bsad), .best_dx(bdx), .best_dy(bdy));
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge before the first clock edge

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val(sad_set_t s, int p);
    if (p < 16) return int'(s.s4x4[p]);
    if (p < 24) return int'(s.s8x4[p-16]);
    if (p < 32) return int'(s.s4x8[p-24]);
    if (p < 36) return int'(s.s8x8[p-32]);
    if (p < 38) return int'(s.s16x8[p-36]);
    if (p < 40) return int'(s.s8x16[p-38]);
    return int'(s.s16x16);
  endfunction

  initial begin
    edx = '0; edy = '0; sads = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
      for (int n = 0; n < 300; n++) begin
        ev = 1'($urandom_range(0, 3) != 0);
        edx = mv_comp_t'($urandom_range(0, 32) - 16);
        edy = mv_comp_t'($urandom_range(0, 32) - 16);
        for (int i = 0; i < 16; i++) sads.s4x4[i] = 12'($urandom_range(0, 20));
        for (int i = 0; i < 8; i++) begin
          sads.s8x4[i] = 13'($urandom_range(0, 20));
          sads.s4x8[i] = 13'($urandom_range(0, 20));
        end
        for (int i = 0; i < 4; i++) sads.s8x8[i] = 14'($urandom_range(0, 20));
        for (int i = 0; i < 2; i++) begin
          sads.s16x8[i] = 15'($urandom_range(0, 20));
          sads.s8x16[i] = 15'($urandom_range(0, 20));
        end
        sads.s16x16 = 16'($urandom_range(0, 20));
        @(posedge clk); #1;
        if (ev) begin
          for (int p = 0; p < N_PART; p++) begin
            if (n == 0 || val(sads, p) < msad[p]) begin
              msad[p] = val(sads, p); mdx[p] = int'(edx); mdy[p] = int'(edy);
            end else if (val(sads, p) == msad[p]) ties++;
          end
        end else if (n == 0) begin
          ev = 1'b1;  // make sure the first point of a run is valid
          @(posedge clk); #1;
          for (int p = 0; p < N_PART; p++) begin
            msad[p] = val(sads, p); mdx[p] = int'(edx); mdy[p] = int'(edy);
          end
        end
        for (int p = 0; p < N_PART; p++) begin
          checks++;
          if (int'(bsad[p]) != msad[p] || int'(bdx[p]) != mdx[p] || int'(bdy[p]) != mdy[p]) begin
            failures++;
            if (failures < 10) $display("run %0d n %0d part %0d: %0d (%0d,%0d) vs %0d (%0d,%0d)",
              run, n, p, bsad[p], bdx[p], bdy[p], msad[p], mdx[p], mdy[p]);
          end
        end
      end
      ev = 1'b0;
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
