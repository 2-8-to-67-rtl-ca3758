// clk_gate: latch-based clock gate cell. The latch is named in the published
// gated-clock controller; gating the clock with an AND after it is this design's choice.
// The enable is captured by a latch that is transparent while clk is low, so
// it cannot change while clk is high and the gated clock has no glitches.
// en must be valid before the rising edge it is meant to pass, like the
// enable of a flip-flop. The latch is intended.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;
  always_latch
    if (!clk) en_lat = en;
  assign gclk = clk & en_lat;
endmodule
