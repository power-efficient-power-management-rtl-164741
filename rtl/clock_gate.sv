// clock_gate: latch-based integrated clock gate.
//
// The enable is captured by a latch that is transparent while clk is low and
// the gated clock is clk AND the latched enable. The enable may therefore
// change at any time during the high phase of clk without producing a glitch
// or a short pulse on gclk: a rising edge of clk is passed on only when en
// was 1 just before it. Used to stop the clock of the PSM state flip-flops
// while the PSM is idle. The latch is intended; it is the standard way to
// gate a clock without glitches.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
