// step_counter: moved-number (MN) counter of the square search control.
//
// Counts the unit moves made so far in the current search step; its value
// addresses the moving-direction ROM together with the previous step's
// end-point and min-point. clr (synchronous) restarts the count at 0 at the
// start of a step and takes priority over inc, which advances it by one
// after each issued move. The width is this design's choice: three bits
// cover the longest move string of eight.
module step_counter #(
  parameter int unsigned MN_W = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            inc,
  output logic [MN_W-1:0] mn
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   mn <= '0;
    else if (clr) mn <= '0;
    else if (inc) mn <= mn + 1'b1;
  end
endmodule
