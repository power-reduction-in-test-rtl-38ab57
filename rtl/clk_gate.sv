// clk_gate: clock gate producing one scan partition's clock (CLK1, CLK2, ...)
// from the test clock and that partition's control line.
//
// The enable is captured by a latch that is transparent while clk is low and
// ANDed with clk, so gclk only carries whole clock pulses and never glitches
// when en changes after a rising edge. The intended latch is the reason the
// tools report one here. Timing: en sampled before the rising edge of clk
// decides whether that edge reaches gclk.
// The document derives each partition clock from the clock tree with the
// partition's control signal; the latch-based gate style is this design's.
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
