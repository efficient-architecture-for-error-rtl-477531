// clock_gate: latch-based clock gate for the low-power path-metric unit.
//
// The enable is captured by a latch that is transparent while clk is low and
// the gated clock is clk AND the latched enable, so gclk can only start or
// stop while clk is low and never glitches. In the detector the enable is the
// sample-valid signal: the state-metric registers and the survivor memory are
// clocked only for stages that carry a sample.
//
// The latch is intentional: it is the standard integrated clock-gating cell,
// which a technology library would supply as one cell.
//
// Timing: en must be stable before the rising edge of clk; the pulse on gclk
// is the clock high phase of that cycle.
module clock_gate (
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
