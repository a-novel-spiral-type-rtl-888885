// pe_array16x16: the 16x16 search array, built from 16 pe_array4x4 tiles
// arranged 4x4 and joined on all four sides ("from top" to the upper tile's
// "to bottom", and so on), which makes one 16x16 grid of PEs.
// The 16-pixel reference word from the reference memory is wired to all four
// outer edges at once: to the top row (pixel j to column j) when Ref shifts
// down, to the bottom row when it shifts up, to the left column (pixel j to
// row j) when it shifts right and to the right column when it shifts left.
// The 16-pixel current word always enters the top row. Each tile emits one
// 4x4 SAD every cycle; they are output in z-order (see me_pkg). Sharing one
// reference bus between the four edges is this design's reading of the single
// "16 pixel data" path into the array.
// Timing: sad4x4 at cycle t+1 belongs to the window held during cycle t.
module pe_array16x16
  import me_pkg::*;
(
  input  logic     clk,
  input  pe_mode_t mode,
  input  word_t    cur_word,
  input  word_t    ref_word,
  output logic [15:0][SAD4_W-1:0] sad4x4
);

  // Tile-edge buses indexed [tile row][tile col].
  pix_t [3:0] cur_out_b [4][4];
  pix_t [3:0] ref_out_t [4][4];
  pix_t [3:0] ref_out_b [4][4];
  pix_t [3:0] ref_out_l [4][4];
  pix_t [3:0] ref_out_r [4][4];
  pix_t [3:0] cur_in_t  [4][4];
  pix_t [3:0] ref_in_t  [4][4];
  pix_t [3:0] ref_in_b  [4][4];
  pix_t [3:0] ref_in_l  [4][4];
  pix_t [3:0] ref_in_r  [4][4];

  for (genvar tr = 0; tr < 4; tr++) begin : g_tr
    for (genvar tc = 0; tc < 4; tc++) begin : g_tc
      for (genvar i = 0; i < 4; i++) begin : g_i
        if (tr == 0) begin : g_top
          assign cur_in_t[tr][tc][i] = cur_word[(4*tc+i)*PIX_W +: PIX_W];
          assign ref_in_t[tr][tc][i] = ref_word[(4*tc+i)*PIX_W +: PIX_W];
        end else begin : g_ntop
          assign cur_in_t[tr][tc][i] = cur_out_b[(tr+3)%4][tc][i];
          assign ref_in_t[tr][tc][i] = ref_out_b[(tr+3)%4][tc][i];
        end
        if (tr == 3) begin : g_bot
          assign ref_in_b[tr][tc][i] = ref_word[(4*tc+i)*PIX_W +: PIX_W];
        end else begin : g_nbot
          assign ref_in_b[tr][tc][i] = ref_out_t[(tr+1)%4][tc][i];
        end
        if (tc == 0) begin : g_left
          assign ref_in_l[tr][tc][i] = ref_word[(4*tr+i)*PIX_W +: PIX_W];
        end else begin : g_nleft
          assign ref_in_l[tr][tc][i] = ref_out_r[tr][(tc+3)%4][i];
        end
        if (tc == 3) begin : g_right
          assign ref_in_r[tr][tc][i] = ref_word[(4*tr+i)*PIX_W +: PIX_W];
        end else begin : g_nright
          assign ref_in_r[tr][tc][i] = ref_out_l[tr][(tc+1)%4][i];
        end
      end

      pe_array4x4 u_tile (
        .clk            (clk),
        .mode           (mode),
        .cur_in_top     (cur_in_t[tr][tc]),
        .ref_in_top     (ref_in_t[tr][tc]),
        .ref_in_bottom  (ref_in_b[tr][tc]),
        .ref_in_left    (ref_in_l[tr][tc]),
        .ref_in_right   (ref_in_r[tr][tc]),
        .cur_out_bottom (cur_out_b[tr][tc]),
        .ref_out_top    (ref_out_t[tr][tc]),
        .ref_out_bottom (ref_out_b[tr][tc]),
        .ref_out_left   (ref_out_l[tr][tc]),
        .ref_out_right  (ref_out_r[tr][tc]),
        .sad4x4         (sad4x4[(tr/2)*8 + (tc/2)*4 + (tr%2)*2 + (tc%2)])
      );
    end
  end

endmodule
