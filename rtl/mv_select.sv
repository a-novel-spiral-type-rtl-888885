// mv_select: best-match selection. For each of the 41 sub-blocks of the
// macroblock (numbered as in me_pkg::part_sad) it keeps the smallest SAD seen
// since clear and the motion vector of the search point that gave it. A new
// SAD replaces the stored one only if it is strictly smaller, so among equal
// SADs the point searched first, i.e. nearest the spiral's center, wins.
// Interface: clear starts a new macroblock; each cycle with eval_valid
// presents one search point (its SADs and MV). Results update on the clock
// edge that ends that cycle. The tie rule and widths are this design's choice.
module mv_select
  import me_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      eval_valid,
  input  mv_comp_t  eval_dx,
  input  mv_comp_t  eval_dy,
  input  sad_set_t  sads,
  output sad_t      best_sad [N_PART],
  output mv_comp_t  best_dx  [N_PART],
  output mv_comp_t  best_dy  [N_PART]
);

  logic have;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0;
      for (int p = 0; p < N_PART; p++) begin
        best_sad[p] <= '1; best_dx[p] <= '0; best_dy[p] <= '0;
      end
    end else if (clear) begin
      have <= 1'b0;
    end else if (eval_valid) begin
      have <= 1'b1;
      for (int p = 0; p < N_PART; p++) begin
        if (!have || part_sad(sads, p) < best_sad[p]) begin
          best_sad[p] <= part_sad(sads, p);
          best_dx[p]  <= eval_dx;
          best_dy[p]  <= eval_dy;
        end
      end
    end
  end

endmodule
