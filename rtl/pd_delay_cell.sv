// pd_delay_cell: behavioural model of the fixed delay elements (D1, D2)
// that skew the clocks of the phase detector's two window comparators
// (an analog cell designed for a PVT-stable delay; not synthesizable).
//
// The lock window is +/- DELAY_PS around zero phase error, 16 ps wide by
// default, within the 14 ps to 20 ps the design measures across corners
// and above the fine-line step, as the design requires.
// Interface: a in, y out. Timing: transport delay DELAY_PS.
module pd_delay_cell #(
  parameter real DELAY_PS = 8.0
) (
  input  logic a,
  output logic y
);
  timeunit 1ps; timeprecision 10fs;

  initial y = 1'b0;

  // Delayed copy of the input. Input edges must be further apart than
  // the delay (true here: every delay is below half the clock period).
  always @(a) y <= #(DELAY_PS) a;

endmodule
