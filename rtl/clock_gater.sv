// clock_gater: integrated clock gate (latch + AND).
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the latch output is ANDed with the clock. The enable may therefore
// change at any time during the low phase; it is frozen at the rising edge,
// so gclk carries either a whole clock pulse or none and cannot glitch.
// The latch-plus-AND structure is the standard gate named in the method;
// the level polarity (low-transparent latch, positive-edge logic) is this
// design's choice.
//
// Ports: clk (free-running clock), en (enable for the next rising edge,
// must be settled before that edge), gclk (gated clock).
// Timing: a pulse of gclk starts at the rising edge of clk when en was high
// just before that edge.
module clock_gater (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
