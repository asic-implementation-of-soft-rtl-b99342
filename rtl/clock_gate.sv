// clock_gate: latch-based clock gate for one processing unit.
//
// The enable is sampled by a latch that is transparent while the clock is low
// and held while it is high, and the gated clock is clk AND the latched
// enable, so the gated clock never shows a shortened pulse. The original
// detector can gate the clock of each PU individually; the cell used there
// is not described, and this is the common integrated-clock-gate structure.
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
