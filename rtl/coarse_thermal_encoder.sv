// coarse_thermal_encoder: coarse code to thermometer control of the coarse
// delay line.
//
// The controller keeps the coarse setting as a binary code k (0..STAGES-1);
// the line wants a thermal code C with its complement C_bar. Code k sets
// C[0]..C[k] and clears the rest, so k = 0 gives C = 1000..0 (the design's
// shortest path, one element) and each step of k adds one element.
// The binary-to-thermometer mapping is this design's choice; the design
// gives only the C/C_bar example for the shortest path.
// Purely combinational.
module coarse_thermal_encoder #(
  parameter int unsigned STAGES = 32,
  parameter int unsigned W      = $clog2(STAGES)
) (
  input  logic [W-1:0]      code,
  output logic [STAGES-1:0] c,
  output logic [STAGES-1:0] c_bar
);
  timeunit 1ps; timeprecision 10fs;

  always_comb begin
    for (int unsigned i = 0; i < STAGES; i++)
      c[i] = (i <= 32'(code));
    c_bar = ~c;
  end

endmodule
