// bb_phase_detector: two-state bang-bang phase detector.
//
// Decides which of two clocks has its rising edge first. The design builds
// it from cross-coupled NAND latches feeding an RS output latch; here the
// same decision is a flip-flop clocked by the reference input that samples
// the other clock: if clk_out is already high when clk_ref rises, clk_out's
// edge came first (it leads, within half a period), so UP = 1 asks for more
// delay; otherwise DOWN = 1. Taking UP as "delayed clock leads" is this
// design's convention.
//
// Interface: clk_ref (sampling clock), clk_out (sampled clock), active-low
// asynchronous reset. Timing: up/down change just after each rising edge
// of clk_ref and hold for one period.
module bb_phase_detector (
  input  logic clk_ref,
  input  logic clk_out,
  input  logic rst_n,
  output logic up,
  output logic down
);
  timeunit 1ps; timeprecision 10fs;

  logic lead;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) lead <= 1'b0;
    else        lead <= clk_out;
  end

  assign up   = lead;
  assign down = ~lead;

endmodule
