// sad_parallel: the parallel calculation module. From the sixteen 4x4 SADs
// of one search point it forms all larger H.264 partitions in a tree: 8x4 and
// 4x8 from pairs of 4x4, 8x8 from a pair of 4x8, 16x8 and 8x16 from pairs of
// 8x8, and 16x16 from the pair of 8x16. Every width grows by one bit per
// level so nothing saturates. The tree is combinational; one register stage
// (all 41 SADs plus a valid bit) closes the module, which is where the design
// allows registers to be placed for clock speed. Numbering is z-order, see
// me_pkg.
// Timing: out/out_valid at cycle t+1 reflect in/in_valid at cycle t.
module sad_parallel
  import me_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [15:0][SAD4_W-1:0]  sad4x4,
  output logic                     out_valid,
  output sad_set_t                 out
);

  sad_set_t s;

  always_comb begin
    s.s4x4 = sad4x4;
    for (int q = 0; q < 4; q++) begin
      // 8x4: the two 4x4 of one quadrant row; 4x8: the two of one column
      for (int j = 0; j < 2; j++) begin
        s.s8x4[2*q+j] = (SAD4_W+1)'(sad4x4[4*q+2*j]) + (SAD4_W+1)'(sad4x4[4*q+2*j+1]);
        s.s4x8[2*q+j] = (SAD4_W+1)'(sad4x4[4*q+j])   + (SAD4_W+1)'(sad4x4[4*q+j+2]);
      end
      s.s8x8[q] = (SAD4_W+2)'(s.s4x8[2*q]) + (SAD4_W+2)'(s.s4x8[2*q+1]);
    end
    s.s16x8[0] = (SAD4_W+3)'(s.s8x8[0]) + (SAD4_W+3)'(s.s8x8[1]);
    s.s16x8[1] = (SAD4_W+3)'(s.s8x8[2]) + (SAD4_W+3)'(s.s8x8[3]);
    s.s8x16[0] = (SAD4_W+3)'(s.s8x8[0]) + (SAD4_W+3)'(s.s8x8[2]);
    s.s8x16[1] = (SAD4_W+3)'(s.s8x8[1]) + (SAD4_W+3)'(s.s8x8[3]);
    s.s16x16   = SAD16_W'(s.s8x16[0]) + SAD16_W'(s.s8x16[1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) out <= s;

endmodule
