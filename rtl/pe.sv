// pe: one processing element of the search array.
// It holds one pixel of the current macroblock (Cur) and one pixel of the
// reference window (Ref) and outputs |Cur - Ref| combinationally. Ref is
// written through a 4-input multiplexer from the upper, lower, left or right
// neighbour, so the whole reference window can move one pixel in any of the
// four directions per clock; its value leaves on one output that is wired to
// all four neighbours. Cur only ever enters from the upper neighbour and is
// otherwise held. Both multiplexers are steered by the shared pe_mode.
// Timing: registers update on the rising clock; absdiff is combinational from
// the registers. The hold setting of the Ref multiplexer and the absence of a
// reset (every register is overwritten by the 16-cycle load before use) are
// this design's choices.
module pe
  import me_pkg::*;
(
  input  logic     clk,
  input  pe_mode_t mode,
  input  pix_t     cur_from_top,
  input  pix_t     ref_from_top,
  input  pix_t     ref_from_bottom,
  input  pix_t     ref_from_left,
  input  pix_t     ref_from_right,
  output pix_t     cur_q,      // "to bottom"
  output pix_t     ref_q,      // "to top", "to bottom", "to left", "to right"
  output pix_t     absdiff     // |Cur - Ref|
);

  pix_t ref_d;

  always_comb begin
    unique case (mode)
      PE_LOAD, PE_FROM_TOP: ref_d = ref_from_top;
      PE_FROM_BOTTOM:       ref_d = ref_from_bottom;
      PE_FROM_LEFT:         ref_d = ref_from_left;
      PE_FROM_RIGHT:        ref_d = ref_from_right;
      default:              ref_d = ref_q;
    endcase
  end

  always_ff @(posedge clk) begin
    ref_q <= ref_d;
    if (mode == PE_LOAD) cur_q <= cur_from_top;
  end

  assign absdiff = (cur_q > ref_q) ? pix_t'(cur_q - ref_q) : pix_t'(ref_q - cur_q);

endmodule
