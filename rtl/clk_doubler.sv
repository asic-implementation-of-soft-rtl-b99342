// clk_doubler: internal clock of twice the input frequency.
//
// Two input clocks of equal frequency, the second 90 degrees behind the
// first, are combined by an XOR gate. The output has an edge at every edge of
// either input, i.e. twice their frequency, with a duty cycle set by the
// accuracy of the 90-degree phase offset. This lets the detector run above
// the rate an off-chip clock can easily deliver without an on-chip PLL, as in
// the original chip.
module clk_doubler (
  input  logic clk_0,
  input  logic clk_90,
  output logic clk_2x
);

  assign clk_2x = clk_0 ^ clk_90;

endmodule
