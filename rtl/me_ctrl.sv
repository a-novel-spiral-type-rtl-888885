// me_ctrl: control unit of the spiral motion estimator.
// After start it runs three phases:
//   LOAD   16 cycles. Current rows 15..0 and reference rows 31..16 of the
//          window (macroblock E, the zero-motion candidate) are read and
//          shifted into the PE array from the top, so that row 0 ends in the
//          top PE row. The last load cycle makes search point (0,0).
//   SEARCH one spiral move per cycle, (2*RANGE+1)^2 - 1 moves. For each move
//          the controller reads the 16 reference pixels that enter the array
//          (a new top/bottom row or left/right column of the moved
//          candidate) and, one cycle later when they arrive, sets pe_mode so
//          the array shifts by one.
//   DRAIN  waits for the last point to leave the SAD pipeline, then pulses
//          done.
// Every search point is tagged with its motion vector; the tag is delayed to
// line up with the SAD stages: sad_valid with the 4x4 SADs leaving the array
// (issue + 3 cycles), eval_* with the registered outputs of the parallel
// calculation module (issue + 4). One search point per clock in SEARCH, so
// one macroblock takes 16 + (2*RANGE+1)^2 - 1 + 5 cycles from start to done.
// The phase structure, pipeline depth and window addressing (window origin
// at the top-left of macroblock A, search center at (16,16)) are this
// design's choices around the one-point-per-cycle operation the design asks.
module me_ctrl
  import me_pkg::*;
#(
  parameter int unsigned RANGE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // current-pixel SRAM read
  output logic       cur_rd_en,
  output logic [3:0] cur_rd_addr,
  // reference memory read
  output logic       ref_rd_en,
  output logic       ref_rd_vert,
  output logic [5:0] ref_rd_line,
  output logic [5:0] ref_rd_start,
  // PE array control, aligned with the data read in the previous cycle
  output pe_mode_t   pe_mode,
  // search point tags
  output logic       sad_valid,
  output logic       eval_valid,
  output logic       eval_last,
  output mv_comp_t   eval_dx,
  output mv_comp_t   eval_dy
);

  localparam int unsigned LAT = 4;   // issue -> parallel calculation output

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SEARCH, S_DRAIN} state_t;

  state_t     state;
  logic [3:0] cnt;
  dir_t       dir;
  mv_comp_t   sp_dx, sp_dy;
  logic       sp_last, sp_last_move, sp_step;

  spiral_order #(.RANGE(RANGE)) u_order (
    .clk(clk), .rst_n(rst_n), .init(start && state == S_IDLE), .step(sp_step),
    .dir(dir), .dx(sp_dx), .dy(sp_dy), .last(sp_last), .last_move(sp_last_move));

  assign sp_step = (state == S_SEARCH);
  assign busy    = (state != S_IDLE);

  // ---- issue stage ----
  pe_mode_t       mode_d;
  logic           tag_v, tag_last;
  mv_comp_t       tag_dx, tag_dy;
  logic signed [7:0] nx, ny;   // window coordinates of the new candidate's origin

  always_comb begin
    mode_d       = PE_HOLD;
    cur_rd_en    = 1'b0;
    cur_rd_addr  = 4'd15 - cnt;
    ref_rd_en    = 1'b0;
    ref_rd_vert  = 1'b0;
    ref_rd_line  = '0;
    ref_rd_start = '0;
    tag_v        = 1'b0;
    tag_last     = 1'b0;
    tag_dx       = sp_dx;
    tag_dy       = sp_dy;
    nx           = 8'sd16 + 8'(sp_dx);
    ny           = 8'sd16 + 8'(sp_dy);
    unique case (state)
      S_LOAD: begin
        mode_d       = PE_LOAD;
        cur_rd_en    = 1'b1;
        ref_rd_en    = 1'b1;
        ref_rd_line  = 6'(6'd31 - 6'(cnt));
        ref_rd_start = 6'd16;
        tag_v        = (cnt == 4'd15);
        tag_last     = (cnt == 4'd15) && (RANGE == 0);
      end
      S_SEARCH: begin
        ref_rd_en = 1'b1;
        tag_v     = 1'b1;
        tag_last  = sp_last_move;
        unique case (dir)
          DIR_UP:    begin ny = ny - 8'sd1; tag_dy = sp_dy - mv_comp_t'(1); end
          DIR_DOWN:  begin ny = ny + 8'sd1; tag_dy = sp_dy + mv_comp_t'(1); end
          DIR_LEFT:  begin nx = nx - 8'sd1; tag_dx = sp_dx - mv_comp_t'(1); end
          DIR_RIGHT: begin nx = nx + 8'sd1; tag_dx = sp_dx + mv_comp_t'(1); end
        endcase
        unique case (dir)
          DIR_UP:    begin mode_d = PE_FROM_TOP;    ref_rd_vert = 1'b0;
                           ref_rd_line = 6'(ny);        ref_rd_start = 6'(nx); end
          DIR_DOWN:  begin mode_d = PE_FROM_BOTTOM; ref_rd_vert = 1'b0;
                           ref_rd_line = 6'(ny + 8'sd15); ref_rd_start = 6'(nx); end
          DIR_LEFT:  begin mode_d = PE_FROM_LEFT;   ref_rd_vert = 1'b1;
                           ref_rd_line = 6'(nx);        ref_rd_start = 6'(ny); end
          DIR_RIGHT: begin mode_d = PE_FROM_RIGHT;  ref_rd_vert = 1'b1;
                           ref_rd_line = 6'(nx + 8'sd15); ref_rd_start = 6'(ny); end
        endcase
      end
      default: ;
    endcase
  end

  // ---- state register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (start) begin state <= S_LOAD; cnt <= '0; end
        S_LOAD: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= (RANGE == 0) ? S_DRAIN : S_SEARCH;
        end
        S_SEARCH: if (sp_last_move) state <= S_DRAIN;
        S_DRAIN:  if (eval_valid && eval_last) state <= S_IDLE;
      endcase
    end
  end

  // ---- tag pipeline ----
  logic     v_pipe    [LAT];
  logic     l_pipe    [LAT];
  mv_comp_t dx_pipe   [LAT];
  mv_comp_t dy_pipe   [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_pipe[i] <= 1'b0; l_pipe[i] <= 1'b0; dx_pipe[i] <= '0; dy_pipe[i] <= '0;
      end
      pe_mode <= PE_HOLD;
      done    <= 1'b0;
    end else begin
      v_pipe[0]  <= tag_v;
      l_pipe[0]  <= tag_last;
      dx_pipe[0] <= tag_dx;
      dy_pipe[0] <= tag_dy;
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i]  <= v_pipe[i-1];
        l_pipe[i]  <= l_pipe[i-1];
        dx_pipe[i] <= dx_pipe[i-1];
        dy_pipe[i] <= dy_pipe[i-1];
      end
      pe_mode <= mode_d;
      done    <= eval_valid && eval_last;
    end
  end

  assign sad_valid  = v_pipe[LAT-2];
  assign eval_valid = v_pipe[LAT-1];
  assign eval_last  = l_pipe[LAT-1];
  assign eval_dx    = dx_pipe[LAT-1];
  assign eval_dy    = dy_pipe[LAT-1];

  // The search never leaves the stored 48x48 window.
  a_spiral_running: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SEARCH |-> !sp_last)
    else $error("me_ctrl: spiral already finished");
  a_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SEARCH |-> nx >= 0 && nx <= 32 && ny >= 0 && ny <= 32)
    else $error("me_ctrl: candidate (%0d,%0d) outside the window", nx, ny);

endmodule
