// clock_distribution: behavioural model of a clock distribution network
// (a buffer tree; not synthesizable logic). The DLL drives two of them, the
// PHY network and the node controller network. The design names them but
// gives no structure or delay; here each is a fixed insertion delay,
// INSERTION_PS (150 ps by default, this design's choice). The DLL compares
// the PHY network's output with the reference clock, so the loop cancels
// that insertion delay.
// Interface: clk_in root, clk_leaf a leaf. Timing: transport delay.
module clock_distribution #(
  parameter real INSERTION_PS = 150.0
) (
  input  logic clk_in,
  output logic clk_leaf
);
  timeunit 1ps; timeprecision 10fs;

  initial clk_leaf = 1'b0;

  // Delayed copy of the input. Input edges must be further apart than
  // the delay (true here: every delay is below half the clock period).
  always @(clk_in) clk_leaf <= #(INSERTION_PS) clk_in;

endmodule
