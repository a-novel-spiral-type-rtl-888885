// pe_array4x4: a 4x4 tile of PEs that produces one 4x4-block SAD.
// Each PE is linked to its four neighbours inside the tile; the tile's edge
// PEs take their neighbour values from the tile's side ports, so tiles can be
// joined on all four sides. The four absolute differences of each PE row are
// added and stored in a register (the SAD 4x1 stage); the four registered row
// sums are then added into the SAD 4x4 output. The register between the two
// adder levels follows the design; the output adder is combinational from it.
// Timing: sad4x4 at cycle t+1 belongs to the reference window held in the PE
// registers during cycle t (one cycle latency after the window is in place).
// Port vectors are indexed by column (top/bottom) or by row (left/right).
module pe_array4x4
  import me_pkg::*;
(
  input  logic            clk,
  input  pe_mode_t        mode,
  input  pix_t [3:0]      cur_in_top,      // current pixels entering row 0
  input  pix_t [3:0]      ref_in_top,      // into row 0 when Ref shifts down
  input  pix_t [3:0]      ref_in_bottom,   // into row 3 when Ref shifts up
  input  pix_t [3:0]      ref_in_left,     // into column 0 when Ref shifts right
  input  pix_t [3:0]      ref_in_right,    // into column 3 when Ref shifts left
  output pix_t [3:0]      cur_out_bottom,
  output pix_t [3:0]      ref_out_top,     // row 0 Ref values
  output pix_t [3:0]      ref_out_bottom,  // row 3 Ref values
  output pix_t [3:0]      ref_out_left,    // column 0 Ref values
  output pix_t [3:0]      ref_out_right,   // column 3 Ref values
  output logic [SAD4_W-1:0] sad4x4
);

  pix_t cur_q [4][4];
  pix_t ref_q [4][4];
  pix_t ad    [4][4];
  logic [PIX_W+1:0] row_sum [4];
  logic [PIX_W+1:0] row_reg [4];

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      pe u_pe (
        .clk             (clk),
        .mode            (mode),
        .cur_from_top    (r == 0 ? cur_in_top[c]    : cur_q[(r+3)%4][c]),
        .ref_from_top    (r == 0 ? ref_in_top[c]    : ref_q[(r+3)%4][c]),
        .ref_from_bottom (r == 3 ? ref_in_bottom[c] : ref_q[(r+1)%4][c]),
        .ref_from_left   (c == 0 ? ref_in_left[r]   : ref_q[r][(c+3)%4]),
        .ref_from_right  (c == 3 ? ref_in_right[r]  : ref_q[r][(c+1)%4]),
        .cur_q           (cur_q[r][c]),
        .ref_q           (ref_q[r][c]),
        .absdiff         (ad[r][c])
      );
    end
    assign row_sum[r] = (PIX_W+2)'(ad[r][0]) + (PIX_W+2)'(ad[r][1])
                      + (PIX_W+2)'(ad[r][2]) + (PIX_W+2)'(ad[r][3]);
    always_ff @(posedge clk) row_reg[r] <= row_sum[r];
  end

  for (genvar i = 0; i < 4; i++) begin : g_edge
    assign cur_out_bottom[i] = cur_q[3][i];
    assign ref_out_top[i]    = ref_q[0][i];
    assign ref_out_bottom[i] = ref_q[3][i];
    assign ref_out_left[i]   = ref_q[i][0];
    assign ref_out_right[i]  = ref_q[i][3];
  end

  assign sad4x4 = SAD4_W'(row_reg[0]) + SAD4_W'(row_reg[1])
                + SAD4_W'(row_reg[2]) + SAD4_W'(row_reg[3]);

endmodule
