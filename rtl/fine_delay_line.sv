// fine_delay_line: behavioural model of the fine delay line, four fine
// delay units (FDUs) in series (analog; not synthesizable logic).
//
// As in the design's top-level drawing of the line, Clock_in enters the
// FDU driven by Fine_thermal<63:48>, then <47:32>, <31:16>, and the FDU
// driven by <15:0> gives Delayed_Clock. The 64-bit bus comes from the fine
// thermal encoder. The total delay is the sum of the four FDU delays:
// 184 ps with every leg off, falling by 1, 2 or 3 ps per enabled leg.
module fine_delay_line #(
  parameter int unsigned N_FDU    = 4,
  parameter int unsigned FDU_LEGS = 16
) (
  input  logic                      clock_in,
  input  logic [N_FDU*FDU_LEGS-1:0] fine_thermal,
  output logic                      delayed_clock
);
  timeunit 1ps; timeprecision 10fs;

  logic [N_FDU:0] tap;   // tap[N_FDU] = clock_in, tap[0] = delayed clock

  assign tap[N_FDU] = clock_in;

  for (genvar k = N_FDU; k > 0; k--) begin : g_fdu
    fine_delay_unit #(.LEGS(FDU_LEGS)) u_fdu (
      .in   (tap[k]),
      .legs (fine_thermal[(k-1)*FDU_LEGS +: FDU_LEGS]),
      .out  (tap[k-1])
    );
  end

  assign delayed_clock = tap[0];

endmodule
