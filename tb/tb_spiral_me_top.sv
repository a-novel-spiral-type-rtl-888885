// tb_spiral_me_top: end-to-end test of the spiral motion estimator at its
// default size (+-16 search range, 1089 candidates per macroblock).
// Three macroblocks are estimated, each after loading the current block
// and the 48x48 reference window through the top's load ports:
//   1. a random window with the current block copied from a random offset,
//   2. the same with noise added to the current block,
//   3. a two-level window, where many candidates tie and the spiral order
//      decides which vector is kept.
// The testbench computes every candidate's 41 SADs itself, walks the
// candidates in spiral order keeping the first strict minimum, and compares
// all 41 best SADs and vectors. It also checks the 16 + 1089 + 4 cycle
// latency from start to done (one candidate per clock), and counts the
// mechanisms: shifts in each of the four directions, reads that straddle two
// macroblocks and so use both reference SRAMs at once, loads, and ties; any
// that never happened counts as a failure.
module tb_spiral_me_top;
  import me_pkg::*;

  localparam int R = 16, NPT = (2*R+1)*(2*R+1);

  logic clk = 1'b0, rst_n = 1'b1;
  logic cur_ld_valid = 1'b0, ref_ld_valid = 1'b0, ref_ld_vert = 1'b0, start = 1'b0;
  logic [3:0] cur_ld_idx = '0, ref_ld_mb = '0, ref_ld_idx = '0;
  word_t cur_ld_data = '0, ref_ld_data = '0;
  logic busy, done;
  sad_t     best_sad [N_PART];
  mv_comp_t best_dx  [N_PART], best_dy [N_PART];

  int checks = 0, failures = 0;
  int win [48][48];
  int cur [16][16];
  int ox [NPT], oy [NPT];
  int msad [N_PART], mdx [N_PART], mdy [N_PART];
  int n_up = 0, n_down = 0, n_left = 0, n_right = 0, n_load = 0, n_straddle = 0, n_ties = 0;
  int bx [16], by [16];

  spiral_me_top dut (.clk, .rst_n, .cur_ld_valid, .cur_ld_idx, .cur_ld_data,
    .ref_ld_valid, .ref_ld_mb, .ref_ld_vert, .ref_ld_idx, .ref_ld_data,
    .start, .busy, .done, .best_sad, .best_dx, .best_dy);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge before the first clock edge

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on the array's mode and the SRAM enables
  always @(posedge clk) if (rst_n) begin
    unique case (dut.pe_mode)
      PE_FROM_TOP:    n_up++;
      PE_FROM_BOTTOM: n_down++;
      PE_FROM_LEFT:   n_left++;
      PE_FROM_RIGHT:  n_right++;
      PE_LOAD:        n_load++;
      default: ;
    endcase
    if (dut.ref_rd_en && dut.ref_rd_start[3:0] != 4'd0) n_straddle++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // spiral order: ring k = 1 up, 2k-1 right, 2k down, 2k left, 2k up
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
        else if (s == msad[p]) n_ties++;
      end
    end
  endtask

  task automatic load_all();
    for (int r = 0; r < 16; r++) begin
      cur_ld_valid = 1; cur_ld_idx = 4'(r);
      for (int c = 0; c < 16; c++) cur_ld_data[8*c +: 8] = 8'(cur[r][c]);
      @(posedge clk); #1;
    end
    cur_ld_valid = 0;
    for (int mb = 0; mb < 9; mb++)
      for (int v = 0; v < 2; v++)
        for (int i = 0; i < 16; i++) begin
          ref_ld_valid = 1; ref_ld_mb = 4'(mb); ref_ld_vert = 1'(v); ref_ld_idx = 4'(i);
          for (int j = 0; j < 16; j++)
            ref_ld_data[8*j +: 8] = (v == 0) ? 8'(win[(mb/3)*16 + i][(mb%3)*16 + j])
                                             : 8'(win[(mb/3)*16 + j][(mb%3)*16 + i]);
          @(posedge clk); #1;
        end
    ref_ld_valid = 0;
  endtask

  task automatic run_one(string name);
    int cyc = 0;
    load_all();
    model();
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 16 + NPT + 4, $sformatf("%s: start to done %0d cycles", name, cyc));
    for (int p = 0; p < N_PART; p++)
      chk(int'(best_sad[p]) == msad[p] && int'(best_dx[p]) == mdx[p] && int'(best_dy[p]) == mdy[p],
          $sformatf("%s: part %0d got %0d (%0d,%0d) expected %0d (%0d,%0d)", name, p,
                    best_sad[p], best_dx[p], best_dy[p], msad[p], mdx[p], mdy[p]));
    $display("%s: 16x16 best SAD %0d at (%0d,%0d)", name, msad[40], mdx[40], mdy[40]);
    @(posedge clk); #1;
  endtask

  initial begin
    int sx, sy;
    for (int i = 0; i < 16; i++) begin
      bx[i] = ((i / 4) % 2) * 2 + (i % 2);
      by[i] = (i / 8) * 2 + ((i % 4) / 2);
    end
    make_order();
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;

    // 1: exact copy
    for (int y = 0; y < 48; y++) for (int x = 0; x < 48; x++) win[y][x] = $urandom_range(0, 255);
    sx = $urandom_range(0, 32); sy = $urandom_range(0, 32);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur[r][c] = win[sy + r][sx + c];
    run_one("copy");
    chk(msad[40] == 0 && mdx[40] == sx - 16 && mdy[40] == sy - 16, "copy found by the model");

    // 2: noisy copy
    for (int y = 0; y < 48; y++) for (int x = 0; x < 48; x++) win[y][x] = $urandom_range(0, 255);
    sx = $urandom_range(0, 32); sy = $urandom_range(0, 32);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        automatic int v = win[sy + r][sx + c] + $urandom_range(0, 8) - 4;
        cur[r][c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    run_one("noisy");

    // 3: two-level picture, many ties
    for (int y = 0; y < 48; y++) for (int x = 0; x < 48; x++) win[y][x] = 100 + 20 * $urandom_range(0, 1);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur[r][c] = 100 + 20 * $urandom_range(0, 1);
    run_one("ties");

    $display("moves up=%0d down=%0d left=%0d right=%0d, load cycles=%0d, straddling reads=%0d, ties=%0d",
             n_up, n_down, n_left, n_right, n_load, n_straddle, n_ties);
    chk(n_up > 0, "up moves");
    chk(n_down > 0, "down moves");
    chk(n_left > 0, "left moves");
    chk(n_right > 0, "right moves");
    chk(n_load == 3 * 16, "load cycles");
    chk(n_straddle > 0, "straddling reads");
    chk(n_ties > 0, "ties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
