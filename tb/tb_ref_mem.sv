// tb_ref_mem: self-checking test of the double-SRAM reference memory.
// A random 48x48 window is offered through the load port as every
// macroblock in both orientations (the memory keeps only the copies its map
// stores). Then random rows and columns of the four kinds the spiral search
// reads (new top row, bottom row, right column, left column, including
// reads that straddle two macroblocks) are requested, and each returned word
// is compared with the window one cycle later.
module tb_ref_mem;
  import me_pkg::*;

  logic clk = 1'b0;
  logic ld_valid, ld_vert, rd_en, rd_vert;
  logic [3:0] ld_mb, ld_idx;
  logic [5:0] rd_line, rd_start;
  word_t ld_data, rd_word;
  int checks = 0, failures = 0, straddles = 0;
  int win [48][48];   // [y][x]

  ref_mem dut (.clk, .ld_valid, .ld_mb, .ld_vert, .ld_idx, .ld_data,
               .rd_en, .rd_vert, .rd_line, .rd_start, .rd_word);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_valid = 0; rd_en = 0; ld_vert = 0; rd_vert = 0; ld_mb = 0; ld_idx = 0;
    rd_line = 0; rd_start = 0; ld_data = '0;
    for (int y = 0; y < 48; y++)
      for (int x = 0; x < 48; x++) win[y][x] = $urandom_range(0, 255);
    @(posedge clk); #1;
    for (int mb = 0; mb < 9; mb++)
      for (int v = 0; v < 2; v++)
        for (int i = 0; i < 16; i++) begin
          ld_valid = 1; ld_mb = 4'(mb); ld_vert = 1'(v); ld_idx = 4'(i);
          for (int j = 0; j < 16; j++)
            ld_data[8*j +: 8] = (v == 0) ? 8'(win[(mb/3)*16 + i][(mb%3)*16 + j])
                                         : 8'(win[(mb/3)*16 + j][(mb%3)*16 + i]);
          @(posedge clk); #1;
        end
    ld_valid = 0;
    for (int n = 0; n < 3000; n++) begin
      int kind, line, st;
      kind = $urandom_range(0, 3);
      unique case (kind)
        0: begin line = $urandom_range(0, 31);  st = $urandom_range(0, 15);  end // new top row
        1: begin line = $urandom_range(16, 47); st = $urandom_range(16, 32); end // new bottom row
        2: begin line = $urandom_range(16, 47); st = $urandom_range(0, 15);  end // new right column
        default: begin line = $urandom_range(0, 31); st = $urandom_range(16, 32); end // new left column
      endcase
      rd_en = 1; rd_vert = (kind >= 2); rd_line = 6'(line); rd_start = 6'(st);
      if (st % 16 != 0) straddles++;
      @(posedge clk); #1;
      rd_en = 0;
      checks++;
      for (int j = 0; j < 16; j++) begin
        automatic int e = (kind < 2) ? win[line][st + j] : win[st + j][line];
        if (int'(rd_word[8*j +: 8]) != e) begin
          failures++;
          if (failures < 10) $display("read kind %0d line %0d start %0d pixel %0d: %0d vs %0d",
                                      kind, line, st, j, rd_word[8*j +: 8], e);
          break;
        end
      end
    end
    checks++;
    if (straddles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
