// ref_mem: the double-SRAM reference memory.
// The 48x48 search window is nine 16x16 macroblocks, A B C / D E F / G H I
// (row-major, index 0..8). Each stored copy of a macroblock is 16 words of 16
// pixels; a "horizontal" copy has one word per pixel row, a "vertical" copy
// one word per pixel column. The copies are split between two SRAMs so that
// every 16-pixel row or column the spiral search needs, even when it
// straddles two macroblocks, comes from two different SRAMs and is read in
// a single cycle:
//   SRAM1 (8 copies, 128 words): A-h B-v C-v D-h F-h G-v H-v I-h
//   SRAM2 (6 copies,  96 words): B-h D-v E-h E-v F-v H-h
// (h = horizontal, v = vertical). With the 16-word current-pixel SRAM this is
// 15 x 2048 = 30,720 bits. The two words read are merged by a byte shifter:
// output pixel j is window pixel start+j along the requested line.
// Load port: one word per cycle, addressed by macroblock, orientation and
// row/column index; a word whose copy is not stored is ignored. The data
// source supplies vertical copies as columns (no transposer here, this
// design's choice). Read port: rd_vert selects a row (0) or a column (1),
// rd_line is its y (or x) in the window, 0..47, rd_start the first x (or y),
// 0..32. rd_word is valid the cycle after rd_en. Loads take precedence.
module ref_mem
  import me_pkg::*;
(
  input  logic        clk,
  // load from external memory
  input  logic        ld_valid,
  input  logic [3:0]  ld_mb,       // 0..8 = A..I
  input  logic        ld_vert,     // 0: word is a pixel row, 1: a pixel column
  input  logic [3:0]  ld_idx,      // row (or column) inside the macroblock
  input  word_t       ld_data,
  // read towards the PE array
  input  logic        rd_en,
  input  logic        rd_vert,
  input  logic [5:0]  rd_line,
  input  logic [5:0]  rd_start,
  output word_t       rd_word
);

  localparam int unsigned D1 = 128;
  localparam int unsigned D2 = 96;

  typedef struct packed {
    logic [1:0] sram;   // 0: not stored, 1: SRAM1, 2: SRAM2
    logic [2:0] slot;
  } loc_t;

  // Placement of the macroblock copies (Fig. "double SRAM" map above).
  function automatic loc_t locate(logic [3:0] mb, logic vert);
    loc_t l;
    l = '{sram: 2'd0, slot: 3'd0};
    unique case ({mb, vert})
      {4'd0, 1'b0}: l = '{2'd1, 3'd0};   // A-h
      {4'd1, 1'b1}: l = '{2'd1, 3'd1};   // B-v
      {4'd2, 1'b1}: l = '{2'd1, 3'd2};   // C-v
      {4'd3, 1'b0}: l = '{2'd1, 3'd3};   // D-h
      {4'd5, 1'b0}: l = '{2'd1, 3'd4};   // F-h
      {4'd6, 1'b1}: l = '{2'd1, 3'd5};   // G-v
      {4'd7, 1'b1}: l = '{2'd1, 3'd6};   // H-v
      {4'd8, 1'b0}: l = '{2'd1, 3'd7};   // I-h
      {4'd1, 1'b0}: l = '{2'd2, 3'd0};   // B-h
      {4'd3, 1'b1}: l = '{2'd2, 3'd1};   // D-v
      {4'd4, 1'b0}: l = '{2'd2, 3'd2};   // E-h
      {4'd4, 1'b1}: l = '{2'd2, 3'd3};   // E-v
      {4'd5, 1'b1}: l = '{2'd2, 3'd4};   // F-v
      {4'd7, 1'b0}: l = '{2'd2, 3'd5};   // H-h
      default: ;
    endcase
    return l;
  endfunction

  // ---- read address generation ----
  logic [1:0] line_mb, start_mb;
  logic [3:0] line_off, start_off;
  logic [3:0] mb0, mb1;
  loc_t       loc0, loc1, lld;

  assign line_mb   = rd_line[5:4];
  assign line_off  = rd_line[3:0];
  assign start_mb  = rd_start[5:4];
  assign start_off = rd_start[3:0];

  always_comb begin
    if (!rd_vert) begin
      mb0 = 4'(line_mb) * 4'd3 + 4'(start_mb);   // next MB to the right
      mb1 = mb0 + 4'd1;
    end else begin
      mb0 = 4'(start_mb) * 4'd3 + 4'(line_mb);   // next MB below
      mb1 = mb0 + 4'd3;
    end
    loc0 = locate(mb0, rd_vert);
    loc1 = locate(mb1, rd_vert);
    lld  = locate(ld_mb, ld_vert);
  end

  logic        en1, en2, we1, we2;
  logic [6:0]  a1, a2;
  word_t       q1, q2;

  always_comb begin
    we1 = ld_valid && lld.sram == 2'd1;
    we2 = ld_valid && lld.sram == 2'd2;
    en1 = we1 || (!ld_valid && rd_en);
    en2 = we2 || (!ld_valid && rd_en);
    if (ld_valid) begin
      a1 = {lld.slot, ld_idx};
      a2 = {lld.slot, ld_idx};
    end else begin
      a1 = (loc0.sram == 2'd1) ? {loc0.slot, line_off} : {loc1.slot, line_off};
      a2 = (loc0.sram == 2'd2) ? {loc0.slot, line_off} : {loc1.slot, line_off};
    end
  end

  sram_sp #(.DEPTH(D1), .WIDTH(WORD_W)) u_sram1 (
    .clk(clk), .en(en1), .we(we1), .addr(a1), .wdata(ld_data), .rdata(q1));
  sram_sp #(.DEPTH(D2), .WIDTH(WORD_W)) u_sram2 (
    .clk(clk), .en(en2), .we(we2), .addr(a2), .wdata(ld_data), .rdata(q2));

  // ---- alignment, one cycle later ----
  logic       first_in_2_q;
  logic [3:0] off_q;

  always_ff @(posedge clk) begin
    if (rd_en && !ld_valid) begin
      first_in_2_q <= (loc0.sram == 2'd2);
      off_q        <= start_off;
    end
  end

  word_t w0, w1;
  logic [2*WORD_W-1:0] both;
  assign w0   = first_in_2_q ? q2 : q1;
  assign w1   = first_in_2_q ? q1 : q2;
  assign both = {w1, w0} >> (PIX_W * off_q);
  assign rd_word = both[WORD_W-1:0];

  // A read that straddles two macroblocks must find them in different SRAMs.
  always_ff @(posedge clk) begin
    if (rd_en && !ld_valid) begin
      assert (loc0.sram != 2'd0)
        else $error("ref_mem: macroblock %0d not stored in this orientation", mb0);
      if (start_off != 4'd0)
        assert (loc1.sram != 2'd0 && loc1.sram != loc0.sram)
          else $error("ref_mem: macroblocks %0d and %0d not in separate SRAMs", mb0, mb1);
    end
  end

endmodule
