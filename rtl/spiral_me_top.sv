// spiral_me_top: spiral-type integer motion estimator for one 16x16
// macroblock over a +-RANGE search window (33x33 = 1089 candidates at the
// default RANGE of 16), with all seven H.264 block sizes evaluated at once.
// Structure: a 16-word current-pixel SRAM and the double-SRAM reference memory
// (ref_mem) feed a 16x16 PE array (pe_array16x16) whose reference window can
// shift one pixel up, down, left or right per clock. Together with the
// spiral order, in which consecutive candidates are always neighbours, this
// gives one search point per clock. The array's sixteen 4x4 SADs go to the
// parallel calculation module (sad_parallel), and mv_select keeps the best
// motion vector of each of the 41 sub-blocks. me_ctrl sequences it all.
// Use: write the 16 current rows (cur_ld_*) and the reference copies
// (ref_ld_*, see ref_mem for the macroblock/orientation map) while idle,
// then pulse start. done pulses 16 + (2*RANGE+1)^2 + 4 cycles later; the
// best_* outputs then hold, per sub-block, the smallest SAD and its motion
// vector (dx right, dy down, relative to the search center).
// The array, double SRAM, SAD tree and spiral order follow the published
// architecture; the best-vector stage, the load ports and the control
// sequencing are this design's.
module spiral_me_top
  import me_pkg::*;
#(
  parameter int unsigned RANGE = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // current macroblock, one row per cycle (row 0 = top)
  input  logic        cur_ld_valid,
  input  logic [3:0]  cur_ld_idx,
  input  word_t       cur_ld_data,
  // reference window from external memory
  input  logic        ref_ld_valid,
  input  logic [3:0]  ref_ld_mb,
  input  logic        ref_ld_vert,
  input  logic [3:0]  ref_ld_idx,
  input  word_t       ref_ld_data,
  // operation
  input  logic        start,
  output logic        busy,
  output logic        done,
  output sad_t        best_sad [N_PART],
  output mv_comp_t    best_dx  [N_PART],
  output mv_comp_t    best_dy  [N_PART]
);

  logic       cur_rd_en;
  logic [3:0] cur_rd_addr;
  logic       ref_rd_en, ref_rd_vert;
  logic [5:0] ref_rd_line, ref_rd_start;
  pe_mode_t   pe_mode;
  logic       sad_valid, eval_valid;
  mv_comp_t   eval_dx, eval_dy;
  word_t      cur_word, ref_word;
  logic [15:0][SAD4_W-1:0] sad4x4;
  sad_set_t   sads;
  logic       sads_valid;

  me_ctrl #(.RANGE(RANGE)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .cur_rd_en, .cur_rd_addr,
    .ref_rd_en, .ref_rd_vert, .ref_rd_line, .ref_rd_start,
    .pe_mode, .sad_valid, .eval_valid, .eval_last(), .eval_dx, .eval_dy);

  sram_sp #(.DEPTH(16), .WIDTH(WORD_W)) u_cur_sram (
    .clk   (clk),
    .en    (cur_ld_valid || cur_rd_en),
    .we    (cur_ld_valid),
    .addr  (cur_ld_valid ? cur_ld_idx : cur_rd_addr),
    .wdata (cur_ld_data),
    .rdata (cur_word));

  ref_mem u_ref (
    .clk, .ld_valid(ref_ld_valid), .ld_mb(ref_ld_mb), .ld_vert(ref_ld_vert),
    .ld_idx(ref_ld_idx), .ld_data(ref_ld_data),
    .rd_en(ref_rd_en), .rd_vert(ref_rd_vert), .rd_line(ref_rd_line),
    .rd_start(ref_rd_start), .rd_word(ref_word));

  pe_array16x16 u_array (
    .clk, .mode(pe_mode), .cur_word, .ref_word, .sad4x4);

  sad_parallel u_par (
    .clk, .rst_n, .in_valid(sad_valid), .sad4x4,
    .out_valid(sads_valid), .out(sads));

  mv_select u_sel (
    .clk, .rst_n, .clear(start && !busy), .eval_valid, .eval_dx, .eval_dy,
    .sads, .best_sad, .best_dx, .best_dy);

  // The controller's tags and the SAD pipeline must stay in step.
  a_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    sads_valid == eval_valid)
    else $error("spiral_me_top: SAD pipeline and tag pipeline out of step");

  // No loads while a search is running.
  a_no_load: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !cur_ld_valid && !ref_ld_valid)
    else $error("spiral_me_top: memory load during a search");

endmodule
