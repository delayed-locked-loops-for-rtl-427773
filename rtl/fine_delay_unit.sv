// fine_delay_unit: behavioural model of one fine delay unit (FDU), a
// current-starved delay stage (an analog part; not synthesizable logic).
//
// Bias transistors feed the stage a minimum current; 16 switch legs, each
// gated by one thermal bit, add current in parallel. With every leg off the
// stage is slowest; each enabled leg makes it faster. The legs form three
// groups of equal-sized switches, 5 + 5 + 6, and the step is larger in the
// higher groups, as the design reports (about 2 ps in the middle of the
// range). Which bits of the 16-bit slice form which group, and the step
// sizes, are this design's own choices: bits [4:0] group 1 (1 ps), bits
// [9:5] group 2 (2 ps), bits [15:10] group 3 (3 ps), base delay 46 ps.
//
// Interface: in / out clock, legs[15:0] the FDU's slice of Fine_thermal.
// Timing: transport delay T_BASE_PS minus the steps of the enabled legs.
module fine_delay_unit #(
  parameter int unsigned LEGS      = dll_pkg::FDU_LEGS,
  parameter int unsigned G1        = dll_pkg::GRP1_LEGS,
  parameter int unsigned G2        = dll_pkg::GRP2_LEGS,
  parameter real         T_BASE_PS = 46.0,
  parameter real         STEP1_PS  = 1.0,
  parameter real         STEP2_PS  = 2.0,
  parameter real         STEP3_PS  = 3.0
) (
  input  logic            in,
  input  logic [LEGS-1:0] legs,
  output logic            out
);
  timeunit 1ps; timeprecision 10fs;

  real d_ps;

  always_comb begin
    d_ps = T_BASE_PS;
    for (int unsigned j = 0; j < LEGS; j++) begin
      if (legs[j]) begin
        if (j < G1)           d_ps = d_ps - STEP1_PS;
        else if (j < G1 + G2) d_ps = d_ps - STEP2_PS;
        else                  d_ps = d_ps - STEP3_PS;
      end
    end
  end

  initial out = 1'b0;

  // Delayed copy of the input. Input edges must be further apart than
  // the delay (true here: every delay is below half the clock period).
  always @(in) out <= #(d_ps) in;

endmodule
