// spiral_order: generator of the hardware-friendly spiral search order.
// Starting at the search center (0,0), every search point is one unit step
// up, right, down or left of the previous one. Ring k (k = 1..RANGE) is
// walked as: 1 step up, 2k-1 right, 2k down, 2k left, 2k up, which visits
// its 8k points and ends on its top-left corner, where the next ring begins.
// After ring RANGE all (2*RANGE+1)^2 points of the +-RANGE window have been
// visited once. dy grows downwards (up = dy-1), dx to the right.
// The order of rings 1 to 3 is the published one; carrying the same rule on
// to ring RANGE, and the leg/count state machine, are this design's.
// Interface: init puts the walker on the center; each cycle with step high
// takes the move shown on dir and updates dx/dy. last_move flags the final
// move; last is high once the final point is reached, and step is ignored
// from then on. dir is meaningful while last is low.
module spiral_order
  import me_pkg::*;
#(
  parameter int unsigned RANGE = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      init,
  input  logic      step,
  output dir_t      dir,
  output mv_comp_t  dx,
  output mv_comp_t  dy,
  output logic      last,
  output logic      last_move   // the move shown on dir is the final one
);

  localparam int unsigned KW = $clog2(RANGE + 1) + 1;

  typedef enum logic [2:0] {
    LEG_UP1, LEG_RIGHT, LEG_DOWN, LEG_LEFT, LEG_UP
  } leg_t;

  leg_t          leg;
  logic [KW-1:0] ring;      // current ring number k
  logic [KW:0]   cnt;       // moves taken in the current leg
  logic [KW:0]   leg_len;

  always_comb begin
    unique case (leg)
      LEG_UP1:   begin dir = DIR_UP;    leg_len = (KW+1)'(1);                  end
      LEG_RIGHT: begin dir = DIR_RIGHT; leg_len = (KW+1)'(2) * ring - (KW+1)'(1); end
      LEG_DOWN:  begin dir = DIR_DOWN;  leg_len = (KW+1)'(2) * ring;          end
      LEG_LEFT:  begin dir = DIR_LEFT;  leg_len = (KW+1)'(2) * ring;          end
      default:   begin dir = DIR_UP;    leg_len = (KW+1)'(2) * ring;          end
    endcase
  end

  assign last_move = !last && leg == LEG_UP && ring == KW'(RANGE)
                   && cnt + (KW+1)'(1) == leg_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leg <= LEG_UP1; ring <= KW'(1); cnt <= '0; dx <= '0; dy <= '0; last <= 1'b0;
    end else if (init) begin
      leg <= LEG_UP1; ring <= KW'(1); cnt <= '0; dx <= '0; dy <= '0; last <= 1'b0;
    end else if (step && !last) begin
      unique case (dir)
        DIR_UP:    dy <= dy - mv_comp_t'(1);
        DIR_DOWN:  dy <= dy + mv_comp_t'(1);
        DIR_LEFT:  dx <= dx - mv_comp_t'(1);
        DIR_RIGHT: dx <= dx + mv_comp_t'(1);
      endcase
      if (cnt + (KW+1)'(1) == leg_len) begin
        cnt <= '0;
        if (leg == LEG_UP) begin
          leg <= LEG_UP1;
          if (ring == KW'(RANGE)) last <= 1'b1;
          else                    ring <= ring + KW'(1);
        end else begin
          leg <= leg_t'(leg + 3'd1);
        end
      end else begin
        cnt <= cnt + (KW+1)'(1);
      end
    end
  end

endmodule
