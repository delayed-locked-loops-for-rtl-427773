// dll_pkg: sizes and types shared by the all-digital DLL.
//
// The delay-line sizes follow the design: 32 coarse delay elements (four
// units of eight), and a fine line of four fine delay units (FDUs) with 16
// switch legs each, grouped 5 + 5 + 6 per FDU (64 legs, 64 fine codes).
// The controller state encoding and the code widths are this design's own.
package dll_pkg;
  timeunit 1ps; timeprecision 10fs;

  // Coarse delay line: four cascaded units of eight elements.
  localparam int unsigned COARSE_STAGES = 32;
  localparam int unsigned COARSE_W      = $clog2(COARSE_STAGES);

  // Fine delay line: four FDUs, 16 legs each, in three switch groups.
  localparam int unsigned FDU_COUNT     = 4;
  localparam int unsigned FDU_LEGS      = 16;
  localparam int unsigned FINE_LEGS     = FDU_COUNT * FDU_LEGS;  // 64
  localparam int unsigned FINE_W        = $clog2(FINE_LEGS);
  localparam int unsigned GRP1_LEGS     = 5;   // legs per FDU, group 1
  localparam int unsigned GRP2_LEGS     = 5;   // legs per FDU, group 2
  // Group 3 takes the remaining FDU_LEGS - 10 = 6 legs per FDU.

  // Control FSM states (flow: lock check, half-lock check, coarse init,
  // then coarse/fine tracking).
  typedef enum logic [2:0] {
    ST_WAIT       = 3'd0,  // let the phase detector pipeline fill
    ST_CHECK_LOCK = 3'd1,  // first look at LOCK after reset
    ST_CHECK_HALF = 3'd2,  // look at the half-cycle lock flag
    ST_SHIFT_WAIT = 3'd3,  // 180-degree shift issued, wait for it to show
    ST_COARSE_INIT= 3'd4,  // coarse code to mid range
    ST_TRACK      = 3'd5   // per-clock coarse or fine update
  } dll_state_e;

endpackage
