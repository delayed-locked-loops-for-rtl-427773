// dll_controller: digital control FSM of the all-digital DLL.
//
// Runs on the reference clock and follows the design's control flow:
//   1. After reset (and WAIT_CYCLES for the phase-detector pipeline to
//      fill) look at LOCK. If set, keep the present codes: the loop is
//      locked, and the coarse stage counts as done.
//   2. Otherwise look at the half-cycle lock flag. If set, the clocks are
//      180 degrees apart: ask the frequency divider for a half-period slip
//      (toggle shift_req_tgl), which fixes the phase in one step, and wait
//      WAIT_CYCLES for the slip to reach the phase detector.
//   3. Put the coarse code at mid range (half the coarse delay range).
//   4. Track, one update per reference clock: with LOCK set nothing
//      changes; otherwise, while the coarse stage is not done, the coarse
//      code steps +1 on UP and -1 otherwise; once LOCK has been seen the
//      coarse stage is done and only the fine code steps the same way.
// Codes saturate at their ends. The fine code starts at its middle (32);
// the design gives no start value but characterises the line there.
//
// Interface: up / lock / half_lock come from the synchronized phase
// detector; coarse_code and fine_code drive the thermal encoders;
// shift_req_tgl goes to the frequency divider. locked mirrors LOCK for the
// outside; coarse_done and state are status.
// Timing: codes change on the rising clk edge of the cycle that decided.
// rst_n also disables the two step-size assertions below, so lint tools
// see it used both as an asynchronous reset and as a plain signal.
module dll_controller
  import dll_pkg::*;
#(
  parameter int unsigned N_COARSE      = dll_pkg::COARSE_STAGES,
  parameter int unsigned N_FINE        = dll_pkg::FINE_LEGS,
  parameter int unsigned WAIT_CYCLES   = 4,
  parameter int unsigned CW            = $clog2(N_COARSE),
  parameter int unsigned FW            = $clog2(N_FINE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          up,
  input  logic          lock,
  input  logic          half_lock,
  output logic [CW-1:0] coarse_code,
  output logic [FW-1:0] fine_code,
  output logic          shift_req_tgl,
  output logic          locked,
  output logic          coarse_done,
  output dll_state_e    state
);
  timeunit 1ps; timeprecision 10fs;

  localparam logic [CW-1:0] COARSE_MID = CW'(N_COARSE / 2);
  localparam logic [CW-1:0] COARSE_MAX = CW'(N_COARSE - 1);
  localparam logic [FW-1:0] FINE_MID   = FW'(N_FINE / 2);
  localparam logic [FW-1:0] FINE_MAX   = FW'(N_FINE - 1);
  localparam int unsigned   WCW        = $clog2(WAIT_CYCLES + 1);

  logic [WCW-1:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_WAIT;
      wait_cnt      <= WCW'(WAIT_CYCLES);
      coarse_code   <= COARSE_MID;
      fine_code     <= FINE_MID;
      shift_req_tgl <= 1'b0;
      coarse_done   <= 1'b0;
    end else begin
      unique case (state)
        ST_WAIT, ST_SHIFT_WAIT: begin
          if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
          else if (state == ST_WAIT) state <= ST_CHECK_LOCK;
          else                       state <= ST_COARSE_INIT;
        end
        ST_CHECK_LOCK: begin
          if (lock) begin
            coarse_done <= 1'b1;       // keep the codes
            state       <= ST_TRACK;
          end else begin
            state       <= ST_CHECK_HALF;
          end
        end
        ST_CHECK_HALF: begin
          if (half_lock) begin
            shift_req_tgl <= ~shift_req_tgl;
            wait_cnt      <= WCW'(WAIT_CYCLES);
            state         <= ST_SHIFT_WAIT;
          end else begin
            state         <= ST_COARSE_INIT;
          end
        end
        ST_COARSE_INIT: begin
          coarse_code <= COARSE_MID;
          state       <= ST_TRACK;
        end
        ST_TRACK: begin
          if (lock) begin
            coarse_done <= 1'b1;
          end else if (!coarse_done) begin
            if (up && coarse_code != COARSE_MAX)      coarse_code <= coarse_code + 1'b1;
            else if (!up && coarse_code != '0)        coarse_code <= coarse_code - 1'b1;
          end else begin
            if (up && fine_code != FINE_MAX)          fine_code <= fine_code + 1'b1;
            else if (!up && fine_code != '0)          fine_code <= fine_code - 1'b1;
          end
        end
        default: state <= ST_WAIT;
      endcase
    end
  end

  assign locked = lock && (state == ST_TRACK);

  // Codes only move in the tracking state, by one step at a time.
  property p_coarse_step;
    @(posedge clk) disable iff (!rst_n)
      (state == ST_TRACK) |=> (coarse_code - $past(coarse_code) inside {'0, CW'(1), {CW{1'b1}}});
  endproperty
  a_coarse_step: assert property (p_coarse_step);

  property p_fine_step;
    @(posedge clk) disable iff (!rst_n)
      (state == ST_TRACK) |=> (fine_code - $past(fine_code) inside {'0, FW'(1), {FW{1'b1}}});
  endproperty
  a_fine_step: assert property (p_fine_step);

endmodule
