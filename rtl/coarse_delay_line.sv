// coarse_delay_line: behavioural model of the thermometer-coded coarse
// delay line (an inverter-based analog part; not synthesizable logic).
//
// The real line is a fold-back chain: the clock runs down a row of forward
// inverters and returns through the first stage whose control bit turns it
// back, so the number of elements in the clock path follows the thermal
// code. With only C[0] set (C_bar[0] clear) the clock takes the shortest
// path, one element, as the design states. Each further set bit of the
// thermometer code adds one element. The design uses 32 elements (four
// units of eight), each equal to three inverters.
//
// Interface: cin is the clock in, c / c_bar the true and complement
// thermal code, cout the delayed clock. A stage counts only where c is set
// and c_bar is clear. With no stage selected there is no path and cout
// holds its value (a synthesis tool reads that hold as a latch; the model
// is for simulation only).
//
// Timing: transport delay of (selected stages) * T_ELEM_PS. T_ELEM_PS = 7 ps
// is this design's estimate, consistent with the reported 159 ps at coarse
// code 8 with the fine line at mid code; the real value varies with PVT.
module coarse_delay_line #(
  parameter int unsigned STAGES    = 32,
  parameter real         T_ELEM_PS = 7.0
) (
  input  logic              cin,
  input  logic [STAGES-1:0] c,
  input  logic [STAGES-1:0] c_bar,
  output logic              cout
);
  timeunit 1ps; timeprecision 10fs;

  int unsigned n_sel;   // elements in the clock path

  always_comb begin
    n_sel = 0;
    for (int unsigned i = 0; i < STAGES; i++)
      if (c[i] && !c_bar[i]) n_sel++;
  end

  initial cout = 1'b0;

  // Delayed copy of the input. Edges must be further apart than the delay
  // (true here: the longest path, 224 ps, is below half the clock period).
  always @(cin) begin
    if (n_sel != 0) cout <= #(real'(n_sel) * T_ELEM_PS) cin;
  end

endmodule
