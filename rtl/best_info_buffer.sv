// best_info_buffer: results of finished searches for fractional motion
// estimation.
//
// On store, the 41 best SAD/MV pairs of the search that has just ended are
// copied into slot store_ref (one slot per reference frame) and the slot is
// marked valid. The reader addresses a slot and a partition (rd_ref,
// rd_part) and gets the entry combinationally; rd_valid tells whether the
// slot has been written since reset. Parts numbered 41 and above read as
// zero. The buffer and its consumer are named in the published block
// diagram; the organisation by reference frame and the read port are this
// design's.
module best_info_buffer
  import ime_pkg::*;
#(
  parameter int unsigned NUM_REF = 2,
  localparam int unsigned REF_W  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             store,
  input  logic [REF_W-1:0] store_ref,
  input  sad_t             in_sad[NUM_PART],
  input  mv_t              in_mv [NUM_PART],
  input  logic [REF_W-1:0] rd_ref,
  input  logic [5:0]       rd_part,
  output sad_t             rd_sad,
  output mv_t              rd_mv,
  output logic             rd_valid
);
  sad_t sad_q [NUM_REF][NUM_PART];
  mv_t  mv_q  [NUM_REF][NUM_PART];
  logic vld_q [NUM_REF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REF; r++) begin
        vld_q[r] <= 1'b0;
        for (int p = 0; p < NUM_PART; p++) begin
          sad_q[r][p] <= '0;
          mv_q[r][p]  <= '0;
        end
      end
    end else if (store && int'(store_ref) < int'(NUM_REF)) begin
      vld_q[store_ref] <= 1'b1;
      for (int p = 0; p < NUM_PART; p++) begin
        sad_q[store_ref][p] <= in_sad[p];
        mv_q[store_ref][p]  <= in_mv[p];
      end
    end
  end

  always_comb begin
    rd_sad   = '0;
    rd_mv    = '0;
    rd_valid = 1'b0;
    if (int'(rd_ref) < int'(NUM_REF)) begin
      rd_valid = vld_q[rd_ref];
      if (int'(rd_part) < int'(NUM_PART)) begin
        rd_sad = sad_q[rd_ref][rd_part];
        rd_mv  = mv_q[rd_ref][rd_part];
      end
    end
  end
endmodule
