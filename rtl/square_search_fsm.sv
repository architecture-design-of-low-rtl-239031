// square_search_fsm: controller of the four-step square search (FSS) with
// the advanced searching flow.
//
// For each initial search centre (up to MAX_CENTERS, clamped so that its 3x3
// square lies inside the +-SR_X/+-SR_Y search range) the controller
//   1. fills the reference array: 16 downward moves from 16 rows above the
//      square's top-right candidate, the last of which completes that
//      candidate;
//   2. runs step 1 over the 3x3 square with the fixed path
//      left, left, down, right, right, down, left, left, ending at the
//      bottom-left corner (the first end-point);
//   3. waits until the last candidate of the step has been evaluated
//      (WAIT_CYC cycles), then takes the min-point: the best 16x16 candidate
//      seen for this centre, which always lies in the current square. If it
//      is the centre, or MAX_STEPS steps have been run, or the square around
//      the min-point would leave the search range, the centre is finished.
//      Otherwise the min-point becomes the new centre and the moving
//      direction ROM, addressed by the previous end-point, the min-point
//      code and the moved number from the step counter, supplies one move per
//      cycle until its last flag; the corner reached is the next end-point.
// Every move issues one search-window line read (mv_en/mv_dir) and produces
// one candidate, so steps are strung together without refilling the array;
// candidates met again on the way are bubble cycles.
//
// Interface: start with num_centers/centers (sampled at start); busy while
// searching; done for one cycle when all centres are finished (the best info
// is then final). res_* are the 16x16 results returned by the mode decision
// WAIT_CYC cycles after the move that produced them. reads counts line reads
// and steps counts FSS steps of the last search.
// The fill, the one-pixel square, the ROM-driven moves, the end-point and
// min-point as ROM addresses and the step-1 end-point at the bottom-left
// corner follow the published design. The step-1 path, the stop rules at the
// range border, the idle cycles between steps and the handling of several
// centres are this design's choices.
module square_search_fsm
  import ime_pkg::*;
#(
  parameter int unsigned MAX_CENTERS = 4,
  parameter int unsigned MAX_STEPS   = 4,
  parameter int unsigned SR_X        = 32,
  parameter int unsigned SR_Y        = 16,
  localparam int unsigned WAIT_CYC   = 3,
  localparam int unsigned CNT_W      = $clog2(MAX_CENTERS + 1),
  localparam int unsigned IDX_W      = (MAX_CENTERS > 1) ? $clog2(MAX_CENTERS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             start,
  input  logic [CNT_W-1:0] num_centers,
  input  mv_t              centers[MAX_CENTERS],
  output logic             busy,
  output logic             done,
  // 16x16 result of each evaluated candidate (from the mode decision)
  input  logic             res_valid,
  input  sad_t             res_sad16,
  input  mv_t              res_mv,
  // moving direction ROM and step counter
  output ep_t              rom_ep,
  output logic [2:0]       rom_mp,
  input  dir_t             rom_dir,
  input  logic             rom_last,
  output logic             sc_clr,
  output logic             sc_inc,
  // datapath control
  output logic             md_clear,    // empty the decision buffer
  output logic             ag_load,     // set the address generator position
  output mv_t              ag_load_mv,
  output logic             mv_en,       // one move / line read this cycle
  output dir_t             mv_dir,
  output logic             cand_valid,  // the move completes a candidate
  output mv_t              cand_mv,     // MV of the candidate after the move
  // statistics of the last search
  output logic [15:0]      reads,
  output logic [7:0]       steps
);
  typedef enum logic [2:0] {
    S_IDLE, S_CHECK, S_CENTER, S_FILL, S_STEP1, S_WAIT, S_EVAL, S_MOVE
  } state_t;

  state_t           state;
  logic [CNT_W-1:0] ncent_q, ci;
  mv_t              cent_q[MAX_CENTERS];
  mv_t              ctr, pos;
  logic [3:0]       cnt;
  logic [2:0]       step;
  ep_t              ep_q;
  logic [2:0]       mp_q;
  logic             lb_valid;
  sad_t             lb_sad;
  mv_t              lb_mv;

  // step-1 path over the 3x3 square, starting at its top-right corner
  function automatic dir_t step1_dir(input logic [3:0] k);
    unique case (k)
      4'd0, 4'd1, 4'd6, 4'd7: return DIR_LEFT;
      4'd2, 4'd5:             return DIR_DOWN;
      default:                return DIR_RIGHT;
    endcase
  endfunction

  function automatic coord_t clamp(input coord_t v, input int lim);
    if (int'(v) > lim)  return coord_t'(lim);
    if (int'(v) < -lim) return coord_t'(-lim);
    return v;
  endfunction

  function automatic mv_t step_mv(input mv_t p, input dir_t d);
    mv_t n;
    n = p;
    unique case (d)
      DIR_UP:    n.y = p.y - 1'b1;
      DIR_DOWN:  n.y = p.y + 1'b1;
      DIR_LEFT:  n.x = p.x - 1'b1;
      DIR_RIGHT: n.x = p.x + 1'b1;
    endcase
    return n;
  endfunction

  mv_t    start_mv, next_pos;
  logic [IDX_W-1:0] ci_idx;
  assign ci_idx = ci[IDX_W-1:0];
  int     dx, dy;
  logic   stop_here;

  always_comb begin
    start_mv.x = clamp(cent_q[ci_idx].x, int'(SR_X) - 1);
    start_mv.y = clamp(cent_q[ci_idx].y, int'(SR_Y) - 1);

    dx = int'(lb_mv.x) - int'(ctr.x);
    dy = int'(lb_mv.y) - int'(ctr.y);
    stop_here = (dx == 0 && dy == 0) || (int'(step) >= int'(MAX_STEPS)) ||
                (int'(lb_mv.x) > int'(SR_X) - 1) || (int'(lb_mv.x) < 1 - int'(SR_X)) ||
                (int'(lb_mv.y) > int'(SR_Y) - 1) || (int'(lb_mv.y) < 1 - int'(SR_Y));

    rom_ep     = ep_q;
    rom_mp     = mp_q;
    busy       = (state != S_IDLE);
    md_clear   = (state == S_IDLE) && start;
    ag_load    = (state == S_CENTER);
    ag_load_mv = '{x: start_mv.x + 8'sd1, y: start_mv.y - 8'sd17};
    sc_clr     = (state == S_EVAL);
    sc_inc     = (state == S_MOVE);
    mv_en      = 1'b0;
    mv_dir     = DIR_DOWN;
    cand_valid = 1'b0;
    unique case (state)
      S_FILL:  begin mv_en = 1'b1; mv_dir = DIR_DOWN;       cand_valid = (cnt == 4'd15); end
      S_STEP1: begin mv_en = 1'b1; mv_dir = step1_dir(cnt); cand_valid = 1'b1; end
      S_MOVE:  begin mv_en = 1'b1; mv_dir = rom_dir;        cand_valid = 1'b1; end
      default: ;
    endcase
    next_pos = step_mv(pos, mv_dir);
    cand_mv  = next_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ncent_q  <= '0;
      ci       <= '0;
      for (int i = 0; i < MAX_CENTERS; i++) cent_q[i] <= '0;
      ctr      <= '0;
      pos      <= '0;
      cnt      <= '0;
      step     <= '0;
      ep_q     <= EP_TL;
      mp_q     <= '0;
      lb_valid <= 1'b0;
      lb_sad   <= '0;
      lb_mv    <= '0;
      reads    <= '0;
      steps    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (res_valid && (!lb_valid || cand_better(res_sad16, res_mv, lb_sad, lb_mv))) begin
        lb_valid <= 1'b1;
        lb_sad   <= res_sad16;
        lb_mv    <= res_mv;
      end
      if (mv_en) begin
        pos   <= next_pos;
        reads <= reads + 1'b1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          ncent_q <= num_centers;
          cent_q  <= centers;
          ci      <= '0;
          reads   <= '0;
          steps   <= '0;
          state   <= S_CHECK;
        end
        S_CHECK: begin
          if (ci < ncent_q && int'(ci) < int'(MAX_CENTERS)) state <= S_CENTER;
          else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_CENTER: begin
          ctr      <= start_mv;
          pos      <= ag_load_mv;
          lb_valid <= 1'b0;
          cnt      <= '0;
          step     <= 3'd1;
          steps    <= steps + 1'b1;
          state    <= S_FILL;
        end
        S_FILL: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'd15) begin
            cnt   <= '0;
            state <= S_STEP1;
          end
        end
        S_STEP1: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'd7) begin
            ep_q  <= EP_BL;
            cnt   <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == int'(WAIT_CYC) - 1) state <= S_EVAL;
        end
        S_EVAL: begin
          if (stop_here) begin
            ci    <= ci + 1'b1;
            state <= S_CHECK;
          end else begin
            mp_q  <= mp_code(dx, dy);
            ctr   <= lb_mv;
            step  <= step + 1'b1;
            steps <= steps + 1'b1;
            state <= S_MOVE;
          end
        end
        S_MOVE: begin
          if (rom_last) begin
            ep_q  <= ep_t'({next_pos.y > ctr.y, next_pos.x > ctr.x});
            cnt   <= '0;
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The min-point is always a neighbour of the centre or the centre itself.
  a_mp_in_square: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_EVAL |-> (dx >= -1 && dx <= 1 && dy >= -1 && dy <= 1 && lb_valid));
endmodule
