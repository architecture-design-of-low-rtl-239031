// ime_top: low-power integer motion estimation engine for H.264/AVC.
//
// The engine finds, for a 16x16 current macroblock, the best integer motion
// vector of each of the 41 H.264 partitions inside one reference search
// window of +-SR_X x +-SR_Y pixels, using a four-step square search with a
// one-pixel square, several initial centres, and SAD of 4x4 blocks reused for
// every larger block size.
//
// Datapath (one candidate per cycle once the array is full):
//   sw_sram (ladder-shaped, 16 banks) -> line of 16 pixels ->
//   ref_systolic_array (up/down/left/right shift) + cur_pel_buffer ->
//   pe_array (256 |cur-ref|) -> vbs_adder_tree (41 SADs) ->
//   mode_decision (best SAD/MV per partition) -> best_info_buffer (to FME).
// Control: square_search_fsm with step_counter and move_dir_rom issues one
// moving direction per cycle; sw_addr_gen turns it into the 16 bank
// addresses of the line the move brings into the array.
//
// Timing: a move issued in cycle t reads the search window in t, shifts the
// array at the end of t+1, and the candidate's 41 SADs are compared in t+2.
// The controller waits three cycles at the end of each step for its last
// candidate. A search of one centre takes 16 fill cycles, 8 step-1 moves,
// the moves of steps 2..4 and 4 cycles of step overhead per step.
//
// Interface: load the window (sw_wr_*, sw_wr_blk addressing memory column
// groups) and the macroblock (cur_wr_*), then
// pulse start with ref_idx, num_centers and centers. done pulses when the
// results are in slot ref_idx of the best-info buffer, read through fme_*.
// sw_reads and steps give the SW line reads and FSS steps of the last
// search. The window must not be written while busy. The window is circular
// in 16-pixel column groups: window columns 16g..16g+15 are read from memory
// group (g + sw_col_base) mod (SW_W/16). To move to the next macroblock on
// the right, write the entering group over the leaving one and advance
// sw_col_base; the other groups are reused. sw_col_base must stay below
// SW_W/16 and constant during a search.
// Clock gating: the reference array and the mode-decision registers, the two
// largest register banks of the datapath, run on a gated clock that is on
// only in the start cycle and while busy; they hold their contents while
// the engine sleeps. The controller, the address generator, the pipeline
// tags, the window memory and the macroblock buffer (both written while the
// engine is idle) and the result buffer stay on the free clock. The block structure
// follows the published architecture; the interfaces, pipeline timing and
// reference-frame slots are this design's.
module ime_top
  import ime_pkg::*;
#(
  parameter int unsigned SR_X        = 32,
  parameter int unsigned SR_Y        = 16,
  parameter int unsigned MAX_CENTERS = 4,
  parameter int unsigned NUM_REF     = 2,
  parameter int unsigned MAX_STEPS   = 4,
  localparam int unsigned SW_W   = BLK + 2 * SR_X,
  localparam int unsigned SW_H   = BLK + 2 * SR_Y,
  localparam int unsigned ADDR_W = $clog2(SW_W * SW_H / BLK),
  localparam int unsigned ROW_W  = $clog2(SW_H),
  localparam int unsigned BLKN_W = (SW_W / BLK > 1) ? $clog2(SW_W / BLK) : 1,
  localparam int unsigned CNT_W  = $clog2(MAX_CENTERS + 1),
  localparam int unsigned REF_W  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // search window load
  input  logic              sw_wr_en,
  input  logic [ROW_W-1:0]  sw_wr_row,
  input  logic [BLKN_W-1:0] sw_wr_blk,
  input  pix_t              sw_wr_data[BLK],
  input  logic [BLKN_W-1:0] sw_col_base,   // memory group of window columns 0..15
  // current macroblock load
  input  logic              cur_wr_en,
  input  logic [3:0]        cur_wr_row,
  input  pix_t              cur_wr_data[BLK],
  // search command
  input  logic              start,
  input  logic [REF_W-1:0]  ref_idx,
  input  logic [CNT_W-1:0]  num_centers,
  input  mv_t               centers[MAX_CENTERS],
  output logic              busy,
  output logic              done,
  output logic [15:0]       sw_reads,
  output logic [7:0]        steps,
  // best info read port (to FME)
  input  logic [REF_W-1:0]  fme_ref,
  input  logic [5:0]        fme_part,
  output sad_t              fme_sad,
  output mv_t               fme_mv,
  output logic              fme_valid
);
  // control
  ep_t              rom_ep;
  logic [2:0]       rom_mp, mn;
  dir_t             rom_dir, mv_dir;
  logic             rom_last, sc_clr, sc_inc;
  logic             md_clear, ag_load, mv_en, cand_valid;
  mv_t              ag_load_mv, cand_mv, ag_pos_mv;
  logic             res_valid;
  sad_t             res_sad16;
  mv_t              res_mv;
  logic [REF_W-1:0] ref_q;

  // datapath
  logic              rd_en;
  logic [ADDR_W-1:0] rd_addr[BLK];
  logic [3:0]        rd_rot;
  pix_t              line[BLK];
  pix_t              refp[BLK][BLK];
  pix_t              cur[BLK][BLK];
  pix_t              diff[BLK][BLK];
  sad_t              sad[NUM_PART];
  sad_t              best_sad[NUM_PART];
  mv_t               best_mv[NUM_PART];

  // gated clock for the datapath registers that only work during a search
  logic gclk;
  clock_gate u_cg (.clk, .en(start | busy), .gclk);

  // pipeline alignment: move issued in t -> array shift at end of t+1 ->
  // candidate compared in t+2
  logic shift_en_q;
  dir_t shift_dir_q;
  logic cv_q1, cv_q2;
  mv_t  cmv_q1, cmv_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_en_q  <= 1'b0;
      shift_dir_q <= DIR_DOWN;
      cv_q1       <= 1'b0;
      cv_q2       <= 1'b0;
      cmv_q1      <= '0;
      cmv_q2      <= '0;
      ref_q       <= '0;
    end else begin
      shift_en_q  <= mv_en;
      shift_dir_q <= mv_dir;
      cv_q1       <= cand_valid;
      cv_q2       <= cv_q1;
      cmv_q1      <= ag_pos_mv;
      cmv_q2      <= cmv_q1;
      if (start && !busy) ref_q <= ref_idx;
    end
  end

  square_search_fsm #(
    .MAX_CENTERS(MAX_CENTERS), .MAX_STEPS(MAX_STEPS), .SR_X(SR_X), .SR_Y(SR_Y)
  ) u_fsm (
    .clk, .rst_n, .start, .num_centers, .centers, .busy, .done,
    .res_valid, .res_sad16, .res_mv,
    .rom_ep, .rom_mp, .rom_dir, .rom_last, .sc_clr, .sc_inc,
    .md_clear, .ag_load, .ag_load_mv, .mv_en, .mv_dir, .cand_valid, .cand_mv,
    .reads(sw_reads), .steps
  );

  step_counter u_step_counter (.clk, .rst_n, .clr(sc_clr), .inc(sc_inc), .mn);

  move_dir_rom u_rom (.ep(rom_ep), .mp(rom_mp), .mn, .dir(rom_dir), .last(rom_last));

  sw_addr_gen #(.SW_W(SW_W), .SW_H(SW_H), .SR_X(SR_X), .SR_Y(SR_Y)) u_addr_gen (
    .clk, .rst_n, .col_base(sw_col_base), .load(ag_load), .load_mv(ag_load_mv), .mv_en, .dir(mv_dir),
    .rd_en, .rd_addr, .rd_rot, .pos_mv(ag_pos_mv)
  );

  sw_sram #(.SW_W(SW_W), .SW_H(SW_H)) u_sw_sram (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_rot, .line_out(line),
    .wr_en(sw_wr_en), .wr_row(sw_wr_row), .wr_blk(sw_wr_blk), .wr_data(sw_wr_data)
  );

  ref_systolic_array u_ref_array (
    .clk(gclk), .rst_n, .shift_en(shift_en_q), .dir(shift_dir_q), .line_in(line), .refp
  );

  cur_pel_buffer u_cur_buf (
    .clk, .rst_n, .wr_en(cur_wr_en), .wr_row(cur_wr_row), .wr_data(cur_wr_data), .cur
  );

  pe_array u_pe (.cur, .refp, .diff);

  vbs_adder_tree u_tree (.diff, .sad);

  mode_decision u_md (
    .clk(gclk), .rst_n, .clear(md_clear), .cand_valid(cv_q2), .cand_mv(cmv_q2), .sad,
    .best_sad, .best_mv, .res_valid, .res_sad16, .res_mv
  );

  best_info_buffer #(.NUM_REF(NUM_REF)) u_best (
    .clk, .rst_n, .store(done), .store_ref(ref_q), .in_sad(best_sad), .in_mv(best_mv),
    .rd_ref(fme_ref), .rd_part(fme_part), .rd_sad(fme_sad), .rd_mv(fme_mv), .rd_valid(fme_valid)
  );

  // The address generator and the controller track the same position.
  a_pos_agree: assert property (@(posedge clk) disable iff (!rst_n)
    mv_en |-> ag_pos_mv == cand_mv);
  // The window base stays inside the window and does not move during a search.
  a_base_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(sw_col_base) < int'(SW_W / BLK));
  a_base_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy |=> !busy || $stable(sw_col_base));
  // The window is loaded only while the engine is idle.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    sw_wr_en |-> !busy);
endmodule
