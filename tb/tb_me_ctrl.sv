// tb_me_ctrl: self-checking test of the control unit with RANGE = 3.
// Checks the 16 load cycles (current rows 15..0, reference rows 31..16 from
// x = 16), then for each of the 48 spiral moves the 16-pixel line it reads
// (derived here from the reference 7x7 order and the direction of the move),
// the pe_mode one cycle later, the SAD and evaluation tags 3 and 4 cycles
// after issue, and the cycle on which done pulses: one search point per
// clock, 16 + 49 + 4 cycles from start.
module tb_me_ctrl;
  import me_pkg::*;

  localparam int R = 3, NPT = (2*R+1)*(2*R+1);
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic busy, done, cur_rd_en, ref_rd_en, ref_rd_vert, sad_valid, eval_valid, eval_last;
  logic [3:0] cur_rd_addr;
  logic [5:0] ref_rd_line, ref_rd_start;
  pe_mode_t pe_mode;
  mv_comp_t eval_dx, eval_dy;
  int checks = 0, failures = 0;

  int grid [7][7] = '{
    '{48, 25, 26, 27, 28, 29, 30},
    '{47, 24,  9, 10, 11, 12, 31},
    '{46, 23,  8,  1,  2, 13, 32},
    '{45, 22,  7,  0,  3, 14, 33},
    '{44, 21,  6,  5,  4, 15, 34},
    '{43, 20, 19, 18, 17, 16, 35},
    '{42, 41, 40, 39, 38, 37, 36}};
  int ex [NPT], ey [NPT];
  pe_mode_t exp_mode [200];
  bit       issue_v [200];
  int       issue_pt [200];

  me_ctrl #(.RANGE(R)) dut (.clk, .rst_n, .start, .busy, .done, .cur_rd_en, .cur_rd_addr,
    .ref_rd_en, .ref_rd_vert, .ref_rd_line, .ref_rd_start, .pe_mode, .sad_valid,
    .eval_valid, .eval_last, .eval_dx, .eval_dy);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge before the first clock edge

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int done_at;
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++) begin ex[grid[r][c]] = c - 3; ey[grid[r][c]] = r - 3; end
    for (int t = 0; t < 200; t++) begin exp_mode[t] = PE_HOLD; issue_v[t] = 0; issue_pt[t] = 0; end
    done_at = -1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    chk(!busy && !done, "idle after reset");
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    for (int t = 0; t < 100; t++) begin
      // issue-stage outputs of cycle t
      if (t < 16) begin
        chk(cur_rd_en && cur_rd_addr == 4'(15 - t), $sformatf("cur read at %0d", t));
        chk(ref_rd_en && !ref_rd_vert && int'(ref_rd_line) == 31 - t && ref_rd_start == 6'd16,
            $sformatf("ref load read at %0d", t));
        exp_mode[t] = PE_LOAD;
        if (t == 15) begin issue_v[t] = 1; issue_pt[t] = 0; end
      end else if (t < 16 + NPT - 1) begin
        int n, nx, ny, ddx, ddy;
        n = t - 15;
        nx = 16 + ex[n]; ny = 16 + ey[n];
        ddx = ex[n] - ex[n-1]; ddy = ey[n] - ey[n-1];
        issue_v[t] = 1; issue_pt[t] = n;
        chk(!cur_rd_en && ref_rd_en, "search read enables");
        if (ddy == -1) begin
          exp_mode[t] = PE_FROM_TOP;
          chk(!ref_rd_vert && int'(ref_rd_line) == ny && int'(ref_rd_start) == nx, $sformatf("up read n=%0d", n));
        end else if (ddy == 1) begin
          exp_mode[t] = PE_FROM_BOTTOM;
          chk(!ref_rd_vert && int'(ref_rd_line) == ny + 15 && int'(ref_rd_start) == nx, $sformatf("down read n=%0d", n));
        end else if (ddx == 1) begin
          exp_mode[t] = PE_FROM_RIGHT;
          chk(ref_rd_vert && int'(ref_rd_line) == nx + 15 && int'(ref_rd_start) == ny, $sformatf("right read n=%0d", n));
        end else begin
          exp_mode[t] = PE_FROM_LEFT;
          chk(ref_rd_vert && int'(ref_rd_line) == nx && int'(ref_rd_start) == ny, $sformatf("left read n=%0d", n));
        end
      end else begin
        chk(!ref_rd_en && !cur_rd_en, $sformatf("no reads at %0d", t));
      end
      // delayed outputs
      if (t >= 1) chk(pe_mode == exp_mode[t-1], $sformatf("pe_mode at %0d: %0d", t, pe_mode));
      if (t >= 3) chk(sad_valid == issue_v[t-3], $sformatf("sad_valid at %0d", t));
      if (t >= 4) begin
        chk(eval_valid == issue_v[t-4], $sformatf("eval_valid at %0d", t));
        if (issue_v[t-4]) begin
          chk(int'(eval_dx) == ex[issue_pt[t-4]] && int'(eval_dy) == ey[issue_pt[t-4]],
              $sformatf("tag of point %0d", issue_pt[t-4]));
          chk(eval_last == (issue_pt[t-4] == NPT - 1), "eval_last");
        end
      end
      if (done && done_at < 0) done_at = t;
      @(posedge clk); #1;
    end
    chk(done_at == 16 + NPT + 3, $sformatf("done at cycle %0d", done_at));
    chk(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
