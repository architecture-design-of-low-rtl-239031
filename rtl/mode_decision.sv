// mode_decision: decision unit and SAD buffer.
//
// For every candidate that reaches it (cand_valid), the unit compares each
// of the 41 partition SADs with the best kept so far for that partition and
// replaces the entry (SAD and the candidate's MV) when the candidate is
// better by ime_pkg::cand_better (smaller SAD; on equal SAD the smaller y,
// then the smaller x). clear (synchronous) empties the buffer at the start of
// a search. best_sad/best_mv show the buffer; the update is visible one
// cycle after cand_valid. The 16x16 SAD and MV of each candidate are also
// registered onto res_valid/res_sad16/res_mv, one cycle after cand_valid,
// for the square search controller, which uses only the 16x16 cost to steer
// the search.
// The published design names this unit and its place between the adder tree,
// the search controller and the best-info buffer; the per-partition minimum,
// the tie-break and the timing are this design's choices. No motion-vector
// rate term is added to the SAD.
module mode_decision
  import ime_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic cand_valid,
  input  mv_t  cand_mv,
  input  sad_t sad     [NUM_PART],
  output sad_t best_sad[NUM_PART],
  output mv_t  best_mv [NUM_PART],
  output logic res_valid,
  output sad_t res_sad16,
  output mv_t  res_mv
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PART; p++) begin
        best_sad[p] <= '1;
        best_mv[p]  <= '0;
      end
      res_valid <= 1'b0;
      res_sad16 <= '0;
      res_mv    <= '0;
    end else begin
      res_valid <= cand_valid && !clear;
      if (cand_valid) begin
        res_sad16 <= sad[0];
        res_mv    <= cand_mv;
      end
      if (clear) begin
        for (int p = 0; p < NUM_PART; p++) begin
          best_sad[p] <= '1;
          best_mv[p]  <= '0;
        end
      end else if (cand_valid) begin
        for (int p = 0; p < NUM_PART; p++)
          if (cand_better(sad[p], cand_mv, best_sad[p], best_mv[p])) begin
            best_sad[p] <= sad[p];
            best_mv[p]  <= cand_mv;
          end
      end
    end
  end
endmodule
