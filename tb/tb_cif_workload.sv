// tb_cif_workload: one CIF frame (352x288, 22x18 = 396 macroblocks) through
// the estimator at its default size. The reference frame is random texture;
// the current frame is the reference moved by a motion vector that changes
// from macroblock to macroblock (all within +-16), plus +-2 of noise. For
// each macroblock the 48x48 window around it is loaded (pixels outside the
// frame repeat the nearest edge pixel, as H.264 does), only the 14 stored
// macroblock copies are sent, and the search is run. Checked per macroblock:
// all 41 best SADs and vectors against a spiral-order full-search model, the
// 16x16 vector against the planted motion where the true block lies inside
// the frame, and the 1109-cycle start-to-done time. The total cycle count for
// the frame, loads included, is printed together with the frame rate it
// gives at 134 MHz.
module tb_cif_workload;
  import me_pkg::*;

  localparam int R = 16, NPT = (2*R+1)*(2*R+1);
  localparam int FW = 352, FH = 288, MBX = FW/16, MBY = FH/16;

  logic clk = 1'b0, rst_n = 1'b1;
  logic cur_ld_valid = 1'b0, ref_ld_valid = 1'b0, ref_ld_vert = 1'b0, start = 1'b0;
  logic [3:0] cur_ld_idx = '0, ref_ld_mb = '0, ref_ld_idx = '0;
  word_t cur_ld_data = '0, ref_ld_data = '0;
  logic busy, done;
  sad_t     best_sad [N_PART];
  mv_comp_t best_dx  [N_PART], best_dy [N_PART];

  int checks = 0, failures = 0;
  byte unsigned rf [FH][FW];
  byte unsigned cf [FH][FW];
  int win [48][48];
  int cur [16][16];
  int ox [NPT], oy [NPT];
  int msad [N_PART], mdx [N_PART], mdy [N_PART];
  int bx [16], by [16];
  longint cycles = 0;
  int mv_hits = 0, mv_tested = 0;

  spiral_me_top dut (.clk, .rst_n, .cur_ld_valid, .cur_ld_idx, .cur_ld_data,
    .ref_ld_valid, .ref_ld_mb, .ref_ld_vert, .ref_ld_idx, .ref_ld_data,
    .start, .busy, .done, .best_sad, .best_dx, .best_dy);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge before the first clock edge
  always @(posedge clk) if (rst_n) cycles++;

  initial begin
    repeat (700000) @(posedge clk);
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

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // planted motion of macroblock (mx, my)
  function automatic int pmx(int mx, int my); return ((mx * 7 + my * 3) % 33) - 16; endfunction
  function automatic int pmy(int mx, int my); return ((mx * 5 + my * 11) % 33) - 16; endfunction

  task automatic make_order();
    int n = 0, x = 0, y = 0;
    ox[0] = 0; oy[0] = 0;
    for (int k = 1; k <= R; k++) begin
      int len [5] = '{1, 2*k-1, 2*k, 2*k, 2*k};
      int ddx [5] = '{0, 1, 0, -1, 0};
      int ddy [5] = '{-1, 0, 1, 0, -1};
      for (int leg = 0; leg < 5; leg++)
        for (int s = 0; s < len[leg]; s++) begin
          x += ddx[leg]; y += ddy[leg]; n++;
          ox[n] = x; oy[n] = y;
        end
    end
  endtask

  function automatic int part_region(int b4 [4][4], int p);
    int x0, x1, y0, y1, s;
    if (p < 16) begin x0 = bx[p]; x1 = x0; y0 = by[p]; y1 = y0; end
    else if (p < 24) begin
      int q = (p-16)/2, j = (p-16)%2;
      x0 = (q%2)*2; x1 = x0+1; y0 = (q/2)*2 + j; y1 = y0;
    end else if (p < 32) begin
      int q = (p-24)/2, j = (p-24)%2;
      x0 = (q%2)*2 + j; x1 = x0; y0 = (q/2)*2; y1 = y0+1;
    end else if (p < 36) begin
      int q = p-32;
      x0 = (q%2)*2; x1 = x0+1; y0 = (q/2)*2; y1 = y0+1;
    end else if (p < 38) begin x0 = 0; x1 = 3; y0 = (p-36)*2; y1 = y0+1; end
    else if (p < 40) begin x0 = (p-38)*2; x1 = x0+1; y0 = 0; y1 = 3; end
    else begin x0 = 0; x1 = 3; y0 = 0; y1 = 3; end
    s = 0;
    for (int yy = y0; yy <= y1; yy++)
      for (int xx = x0; xx <= x1; xx++) s += b4[yy][xx];
    return s;
  endfunction

  task automatic model();
    int b4 [4][4];
    for (int n = 0; n < NPT; n++) begin
      int wx = 16 + ox[n], wy = 16 + oy[n];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) b4[i][j] = 0;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          int d = cur[r][c] - win[wy + r][wx + c];
          b4[r/4][c/4] += (d < 0) ? -d : d;
        end
      for (int p = 0; p < N_PART; p++) begin
        int s = part_region(b4, p);
        if (n == 0 || s < msad[p]) begin msad[p] = s; mdx[p] = ox[n]; mdy[p] = oy[n]; end
      end
    end
  endtask

  // the copies the reference memory keeps: rows of A B D E F H I, columns of B C D E F G H
  function automatic bit stored(int mb, int v);
    return (v == 0) ? (mb != 2 && mb != 6) : (mb != 0 && mb != 8);
  endfunction

  task automatic load_mb();
    for (int r = 0; r < 16; r++) begin
      cur_ld_valid = 1; cur_ld_idx = 4'(r);
      for (int c = 0; c < 16; c++) cur_ld_data[8*c +: 8] = 8'(cur[r][c]);
      @(posedge clk); #1;
    end
    cur_ld_valid = 0;
    for (int mb = 0; mb < 9; mb++)
      for (int v = 0; v < 2; v++)
        if (stored(mb, v))
          for (int i = 0; i < 16; i++) begin
            ref_ld_valid = 1; ref_ld_mb = 4'(mb); ref_ld_vert = 1'(v); ref_ld_idx = 4'(i);
            for (int j = 0; j < 16; j++)
              ref_ld_data[8*j +: 8] = (v == 0) ? 8'(win[(mb/3)*16 + i][(mb%3)*16 + j])
                                               : 8'(win[(mb/3)*16 + j][(mb%3)*16 + i]);
            @(posedge clk); #1;
          end
    ref_ld_valid = 0;
  endtask

  initial begin
    longint t0;
    for (int i = 0; i < 16; i++) begin
      bx[i] = ((i / 4) % 2) * 2 + (i % 2);
      by[i] = (i / 8) * 2 + ((i % 4) / 2);
    end
    make_order();
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++) rf[y][x] = 8'($urandom);
    for (int my = 0; my < MBY; my++)
      for (int mx = 0; mx < MBX; mx++)
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            automatic int x = clampi(mx*16 + c + pmx(mx, my), 0, FW-1);
            automatic int y = clampi(my*16 + r + pmy(mx, my), 0, FH-1);
            cf[my*16 + r][mx*16 + c] = 8'(clampi(int'(rf[y][x]) + $urandom_range(0, 4) - 2, 0, 255));
          end
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    t0 = cycles;
    for (int my = 0; my < MBY; my++)
      for (int mx = 0; mx < MBX; mx++) begin
        int cyc, tx, ty;
        for (int y = 0; y < 48; y++)
          for (int x = 0; x < 48; x++)
            win[y][x] = rf[clampi(my*16 - 16 + y, 0, FH-1)][clampi(mx*16 - 16 + x, 0, FW-1)];
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur[r][c] = cf[my*16 + r][mx*16 + c];
        load_mb();
        model();
        start = 1; @(posedge clk); #1; start = 0;
        cyc = 1;
        while (!done && cyc < 5000) begin @(posedge clk); #1; cyc++; end
        chk(cyc == 16 + NPT + 4, $sformatf("MB (%0d,%0d): start to done %0d cycles", mx, my, cyc));
        for (int p = 0; p < N_PART; p++)
          chk(int'(best_sad[p]) == msad[p] && int'(best_dx[p]) == mdx[p] && int'(best_dy[p]) == mdy[p],
              $sformatf("MB (%0d,%0d) part %0d: %0d (%0d,%0d) vs %0d (%0d,%0d)", mx, my, p,
                        best_sad[p], best_dx[p], best_dy[p], msad[p], mdx[p], mdy[p]));
        tx = mx*16 + pmx(mx, my); ty = my*16 + pmy(mx, my);
        if (tx >= 0 && tx <= FW-16 && ty >= 0 && ty <= FH-16) begin
          mv_tested++;
          if (int'(best_dx[40]) == pmx(mx, my) && int'(best_dy[40]) == pmy(mx, my)) mv_hits++;
        end
        @(posedge clk); #1;
      end
    $display("CIF frame: %0d macroblocks in %0d cycles (%0d per macroblock, loads included), %0.1f frames/s at 134 MHz",
             MBX*MBY, cycles - t0, (cycles - t0) / (MBX*MBY), 134.0e6 / real'(cycles - t0));
    $display("planted 16x16 motion recovered in %0d of %0d macroblocks", mv_hits, mv_tested);
    chk(mv_tested > 0 && mv_hits == mv_tested, "planted motion recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
