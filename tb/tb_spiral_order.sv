// tb_spiral_order: self-checking test of the spiral order generator.
// With RANGE = 3 the visited points must follow the 7x7 numbering of the
// reference order, given below as a grid (row 0 on top, search center at
// row 3, column 3). With the default RANGE = 16 every one of the 33x33 points
// must be visited exactly once, each move must be one unit step, and the
// walk must end after 1088 moves with last high.
module tb_spiral_order;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, init = 1'b0, step3 = 1'b0, step16 = 1'b0;
  dir_t dir3, dir16;
  mv_comp_t dx3, dy3, dx16, dy16;
  logic last3, last16, lm3, lm16;
  int checks = 0, failures = 0;

  // order number at each grid position [row][col] of the 7x7 reference
  int grid [7][7] = '{
    '{48, 25, 26, 27, 28, 29, 30},
    '{47, 24,  9, 10, 11, 12, 31},
    '{46, 23,  8,  1,  2, 13, 32},
    '{45, 22,  7,  0,  3, 14, 33},
    '{44, 21,  6,  5,  4, 15, 34},
    '{43, 20, 19, 18, 17, 16, 35},
    '{42, 41, 40, 39, 38, 37, 36}};
  int ex [49], ey [49];
  bit seen [33][33];

  spiral_order #(.RANGE(3)) dut3 (.clk, .rst_n, .init, .step(step3), .dir(dir3),
    .dx(dx3), .dy(dy3), .last(last3), .last_move(lm3));
  spiral_order dut16 (.clk, .rst_n, .init, .step(step16), .dir(dir16),
    .dx(dx16), .dy(dy16), .last(last16), .last_move(lm16));

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge before the first clock edge

  initial begin
    repeat (5000) @(posedge clk);
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
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++) begin ex[grid[r][c]] = c - 3; ey[grid[r][c]] = r - 3; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    init = 1'b1; @(posedge clk); #1; init = 1'b0;
    // RANGE 3 against the reference numbering
    for (int n = 0; n < 49; n++) begin
      chk(int'(dx3) == ex[n] && int'(dy3) == ey[n],
          $sformatf("point %0d at (%0d,%0d), expected (%0d,%0d)", n, dx3, dy3, ex[n], ey[n]));
      chk(last3 == (n == 48), "last flag");
      chk(lm3 == (n == 47), "last_move flag");
      step3 = 1'b1; @(posedge clk); #1; step3 = 1'b0;
    end
    chk(int'(dx3) == ex[48] && int'(dy3) == ey[48], "stays on the final point");
    // RANGE 16: full coverage
    for (int i = 0; i < 33; i++) for (int j = 0; j < 33; j++) seen[i][j] = 0;
    begin
      int moves = 0, px = 0, py = 0;
      seen[16][16] = 1;
      while (!last16 && moves < 2000) begin
        step16 = 1'b1; @(posedge clk); #1;
        moves++;
        chk((int'(dx16) - px) * (int'(dx16) - px) + (int'(dy16) - py) * (int'(dy16) - py) == 1,
            "unit step");
        chk(int'(dx16) >= -16 && int'(dx16) <= 16 && int'(dy16) >= -16 && int'(dy16) <= 16,
            "inside range");
        if (int'(dx16) >= -16 && int'(dx16) <= 16 && int'(dy16) >= -16 && int'(dy16) <= 16) begin
          chk(!seen[int'(dy16)+16][int'(dx16)+16], "visited once");
          seen[int'(dy16)+16][int'(dx16)+16] = 1;
        end
        px = int'(dx16); py = int'(dy16);
      end
      step16 = 1'b0;
      chk(moves == 1088, $sformatf("%0d moves", moves));
      for (int i = 0; i < 33; i++) for (int j = 0; j < 33; j++) chk(seen[i][j], "covered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
