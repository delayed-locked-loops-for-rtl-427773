// fine_thermal_encoder: fine code to the 64-bit Fine_thermal bus of the
// fine delay line.
//
// The fine line has four FDUs with 16 switch legs each; in every FDU the
// legs form three groups of 5, 5 and 6 equal switches. The code walks the
// legs in the order the design gives: the first 20 codes switch group 1,
// five legs in the first FDU, then five in the second, and so on; the next
// 20 codes do the same for group 2, and the last 24 for group 3 (six per
// FDU). Since group 3 has the largest steps, the step grows with the code.
//
// Bus layout: FDU f (f = 0 is the one driven by Fine_thermal<15:0>, taken
// here as the "first" FDU) owns bits [16f+15:16f]; inside a slice bits
// [4:0] are group 1, [9:5] group 2, [15:10] group 3.
//
// Code sense (this design's choice): fine_code counts delay, like the
// coarse code. More enabled legs make an FDU faster, so fine_code = f
// switches off the first f legs of that order and leaves the rest on:
// f = 0 is the shortest fine delay (all 64 legs on), f = 63 the longest
// (one leg left on). That gives the 64 fine settings the design counts.
// Purely combinational.
module fine_thermal_encoder #(
  parameter int unsigned N_FDU    = 4,
  parameter int unsigned FDU_LEGS = 16,
  parameter int unsigned G1       = dll_pkg::GRP1_LEGS,
  parameter int unsigned G2       = dll_pkg::GRP2_LEGS,
  parameter int unsigned LEGS     = N_FDU * FDU_LEGS,
  parameter int unsigned W        = $clog2(LEGS)
) (
  input  logic [W-1:0]    fine_code,
  output logic [LEGS-1:0] fine_thermal
);
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned G3 = FDU_LEGS - G1 - G2;

  // Bus bit of position k in the switching order.
  function automatic int unsigned leg_bit(int unsigned k);
    int unsigned o, size, goff;
    if (k < N_FDU * G1) begin
      o = k;                          size = G1; goff = 0;
    end else if (k < N_FDU * (G1 + G2)) begin
      o = k - N_FDU * G1;             size = G2; goff = G1;
    end else begin
      o = k - N_FDU * (G1 + G2);      size = G3; goff = G1 + G2;
    end
    return FDU_LEGS * (o / size) + goff + (o % size);
  endfunction

  always_comb begin
    fine_thermal = '0;
    for (int unsigned k = 0; k < LEGS; k++)
      if (k >= 32'(fine_code)) fine_thermal[leg_bit(k)] = 1'b1;
  end

endmodule
