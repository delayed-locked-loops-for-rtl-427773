// freq_divider: 2UI -> 4UI -> 8UI clock divider with a half-period slip.
//
// Two divide-by-two toggle flip-flops in cascade, as in the design: the
// first toggles on the 2UI input clock (5.6 GHz), its inverted output is
// the 4UI clock (2.8 GHz) that clocks the second, whose output is the 8UI
// clock (1.4 GHz) fed to the delay lines. Both flops clear on the
// active-low reset.
//
// The controller turns a half-cycle lock into a 180-degree shift of the
// 8UI clock. This block does it by holding the second flop for one 4UI
// period, which delays every later 8UI edge by half an 8UI period. The
// request is a level toggle from the reference-clock domain
// (shift_req_tgl); it is brought into the 4UI domain by two flops and each
// change slips exactly one toggle. The slip mechanism is this design's own
// reading of "delay clock by 180 degree ... in one calibration cycle".
//
// Timing: clk_8ui toggles on rising edges of clk_4ui; a slip takes effect
// on the third clk_4ui edge after the request toggles (two-flop synchroniser
// plus the held edge).
module freq_divider (
  input  logic clk_2ui,        // 2UI input clock
  input  logic rst_n,          // active-low asynchronous reset
  input  logic shift_req_tgl,  // each change requests one half-period slip
  output logic clk_4ui,        // 4UI intermediate clock
  output logic clk_8ui         // 8UI output clock
);
  timeunit 1ps; timeprecision 10fs;

  logic q1;          // first divide-by-two stage
  logic q2;          // second divide-by-two stage
  logic [1:0] req_sync;
  logic       req_seen;

  always_ff @(posedge clk_2ui or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= ~q1;
  end

  assign clk_4ui = ~q1;

  always_ff @(posedge clk_4ui or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= '0;
      req_seen <= 1'b0;
      q2       <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], shift_req_tgl};
      req_seen <= req_sync[1];
      // A new request holds the stage for this one edge: 180-degree slip.
      if (req_sync[1] == req_seen) q2 <= ~q2;
    end
  end

  assign clk_8ui = q2;

endmodule
