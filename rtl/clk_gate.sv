// clk_gate: latch-based clock gate.
//
// The enable is captured by a level-sensitive latch that is transparent
// while clk is low and holds while clk is high; the gated clock is clk ANDed
// with the latched enable. Because the latch cannot change while clk is high,
// gclk has no glitches and only whole clock pulses pass. Used twice by the
// clustered gated-clock DSFF (one gate per flip-flop cluster). The latch
// polarity is this design's choice.
//
// Timing: en must be stable before the rising edge of clk; gclk rises with
// clk in every cycle where en was 1 at that edge.
module clk_gate (
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
