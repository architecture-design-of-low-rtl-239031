// clock_gate: glitch-free clock gate for the registers of a sleeping engine.
//
// The enable is captured by a latch that is open while clk is low, and the
// gated clock is clk ANDed with the latched enable. An enable that changes
// while clk is high therefore cannot shorten or start a high pulse: it takes
// effect at the next rising edge. This is the usual integrated clock-gating
// cell written in RTL; a library cell of the same function replaces it in a
// real flow.
//
// Interface: en is sampled for a cycle before its rising edge of clk, the
// same as a flip-flop's data input. gclk follows clk in cycles where en was
// high and stays low otherwise.
//
// The published design gates the clock of the circuits that are idle while
// the engine sleeps; which registers are gated, and this cell, are this
// design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
