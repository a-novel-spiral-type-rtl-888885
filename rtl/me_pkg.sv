// me_pkg: types and constants shared by the spiral-type motion estimator.
// Pixels are 8 bits and one memory word carries 16 pixels (128 bits), as the
// design specifies. The SAD widths follow from the block sizes (a 4x4 SAD of
// 8-bit pixels needs 12 bits, a 16x16 SAD 16 bits). The PE mode encoding, the
// sub-block numbering and the motion-vector width are this design's own.
package me_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned MB     = 16;             // macroblock edge in pixels
  localparam int unsigned WORD_W = MB * PIX_W;     // 128-bit SRAM word
  localparam int unsigned SAD4_W  = 12;            // 16 * 255 < 2^12
  localparam int unsigned SAD16_W = 16;            // 256 * 255 < 2^16
  localparam int unsigned MV_W    = 6;             // signed, covers -16..+16

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WORD_W-1:0] word_t;               // pixel j in bits [8j+7:8j]
  typedef logic [SAD16_W-1:0] sad_t;
  typedef logic signed [MV_W-1:0] mv_comp_t;

  // pe_mode: what the Ref (and Cur) registers of every PE take this cycle.
  typedef enum logic [2:0] {
    PE_HOLD        = 3'd0,  // keep Cur and Ref
    PE_LOAD        = 3'd1,  // Cur and Ref both shift down (from top)
    PE_FROM_TOP    = 3'd2,  // Ref shifts down: search point moves up
    PE_FROM_BOTTOM = 3'd3,  // Ref shifts up: search point moves down
    PE_FROM_LEFT   = 3'd4,  // Ref shifts right: search point moves left
    PE_FROM_RIGHT  = 3'd5   // Ref shifts left: search point moves right
  } pe_mode_t;

  // One step of the spiral search order.
  typedef enum logic [1:0] {
    DIR_UP = 2'd0, DIR_RIGHT = 2'd1, DIR_DOWN = 2'd2, DIR_LEFT = 2'd3
  } dir_t;

  // The 41 SADs of one search point. Indices are 0-based and in z-order:
  // 4x4 block i sits in 8x8 quadrant i/4, at sub-position i%4 (0 TL, 1 TR,
  // 2 BL, 3 BR). 8x4 k = 4x4 {2k, 2k+1} (one row of a quadrant), 4x8 k of
  // quadrant q = 4x4 {4q+j, 4q+j+2}, 16x8 = top/bottom halves, 8x16 =
  // left/right halves.
  typedef struct packed {
    logic [15:0][SAD4_W-1:0]  s4x4;
    logic [7:0][SAD4_W:0]     s8x4;
    logic [7:0][SAD4_W:0]     s4x8;
    logic [3:0][SAD4_W+1:0]   s8x8;
    logic [1:0][SAD4_W+2:0]   s16x8;
    logic [1:0][SAD4_W+2:0]   s8x16;
    logic [SAD16_W-1:0]       s16x16;
  } sad_set_t;

  localparam int unsigned N_PART = 41;

  // Flattened view of a sad_set_t, widened to 16 bits, in the order
  // 4x4[0..15], 8x4[0..7], 4x8[0..7], 8x8[0..3], 16x8[0..1], 8x16[0..1], 16x16.
  function automatic sad_t part_sad(sad_set_t s, int unsigned p);
    if (p < 16)      return sad_t'(s.s4x4[p]);
    else if (p < 24) return sad_t'(s.s8x4[p-16]);
    else if (p < 32) return sad_t'(s.s4x8[p-24]);
    else if (p < 36) return sad_t'(s.s8x8[p-32]);
    else if (p < 38) return sad_t'(s.s16x8[p-36]);
    else if (p < 40) return sad_t'(s.s8x16[p-38]);
    else             return s.s16x16;
  endfunction

endpackage
