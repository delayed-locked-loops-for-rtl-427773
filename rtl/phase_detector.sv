// phase_detector: three-state bang-bang phase detector with lock window,
// half-cycle lock detection and an output synchronizer.
//
// Three two-state detectors, as in the design:
//   * main: clk_ref samples clk_out and gives UP/DOWN;
//   * window A: clk_ref samples clk_out_d (clk_out delayed by dt);
//   * window B: clk_ref_d (clk_ref delayed by dt) samples clk_out.
// With phase error phi = (clk_ref edge) - (clk_out edge) and a 50 % duty
// clock of period T, A = 1 for dt <= phi < T/2+dt and B = 1 for
// -dt <= phi < T/2-dt, so A XOR B (the pre-lock signal) is high in a
// window of width 2*dt around phi = 0, and also around phi = T/2. The two
// cases differ in which comparator is set: B alone is the lock window,
// A alone the half-cycle window (clocks 180 degrees apart), whose width
// therefore equals the lock window's, as the design states. Using A and B
// to tell them apart is this design's choice.
//
// A and B are clocked dt apart, so when both change the pre-lock signal
// glitches for dt just after the reference rising edge. The synchronizer
// (one flip-flop per output) samples up, lock and half-lock on the falling
// edge of clk_ref, half a period after the comparing rising edge, when all
// three comparators have settled. The design calls for a rising-edge
// synchronizer; sampling on the falling edge is this design's choice so
// that the controller sees each comparison at the very next rising edge
// and can update the codes every cycle, as the design intends.
module phase_detector (
  input  logic clk_ref,     // reference clock
  input  logic clk_ref_d,   // reference clock delayed by dt (cell D2)
  input  logic clk_out,     // fed-back delayed clock
  input  logic clk_out_d,   // fed-back clock delayed by dt (cell D1)
  input  logic rst_n,
  output logic up,          // delayed clock leads: add delay
  output logic down,        // delayed clock lags: remove delay
  output logic pre_lock,    // raw window flag (A xor B), glitches
  output logic lock,        // synchronized lock flag
  output logic half_lock    // synchronized half-cycle flag
);
  timeunit 1ps; timeprecision 10fs;

  logic up_raw, dn_raw_unused;
  logic win_a, win_a_n;
  logic win_b, win_b_n;

  bb_phase_detector u_main (
    .clk_ref(clk_ref),   .clk_out(clk_out),   .rst_n(rst_n),
    .up(up_raw),         .down(dn_raw_unused)
  );
  bb_phase_detector u_win_a (
    .clk_ref(clk_ref),   .clk_out(clk_out_d), .rst_n(rst_n),
    .up(win_a),          .down(win_a_n)
  );
  bb_phase_detector u_win_b (
    .clk_ref(clk_ref_d), .clk_out(clk_out),   .rst_n(rst_n),
    .up(win_b),          .down(win_b_n)
  );

  assign pre_lock = win_a ^ win_b;

  // Synchronizer, half a period after the comparison.
  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      up        <= 1'b0;
      lock      <= 1'b0;
      half_lock <= 1'b0;
    end else begin
      up        <= up_raw;
      lock      <= win_b & win_a_n;
      half_lock <= win_a & win_b_n;
    end
  end

  assign down = ~up;

  // The raw down outputs carry no information beyond up.
  logic unused;
  assign unused = dn_raw_unused;

endmodule
