// dll_top: all-digital delay locked loop for a forwarded-clock serial link.
//
// The DLL lines up a locally generated clock with a reference clock using
// only digital control: no charge pump, no loop filter, no analog control
// voltage. The 2UI clock (5.6 GHz) is divided to the 8UI clock (1.4 GHz),
// which runs through a coarse delay line (32 thermometer-coded inverter
// elements, large steps, wide range) and a fine delay line (four
// current-starved FDUs, 64 legs, steps of 1 to 3 ps). The result drives the
// PHY and node-controller clock distribution networks. The PHY network's
// output (clk_phy) is compared with clk_ref by the three-state bang-bang
// phase detector, whose UP, LOCK and half-cycle LOCK flags steer the
// control FSM. The FSM fixes a 180-degree error in one step by slipping the
// divider, adapts fast with the coarse code, then tracks with the fine
// code only, and freezes both codes while the error is inside the lock
// window (+/- 8 ps).
//
// Blocks, signal flow and the control flow follow the design. The code
// conventions, the half-period slip in the divider, the delay values of the
// analog models, and the choice of the PHY network as the compared output
// are this design's own. The delay lines, window delay cells and
// distribution networks are behavioural models with transport delays, so
// this top simulates but is not synthesizable as a whole; the divider,
// encoders, phase detector and controller are synthesizable logic.
//
// Interface: clk_2ui and clk_ref in, rst_n active low (asynchronous);
// clk_8ui, clk_phy and clk_node out; locked, coarse_code and fine_code as
// status. Timing: one code update per clk_ref cycle; the decision taken at
// a rising clk_ref edge uses the comparison made at the previous rising
// edge (the phase detector's falling-edge synchronizer sits in between).
// Lint tools note that clk_phy and the divided clock are sampled as data
// as well as used as clocks: that is the phase detector's job here.
module dll_top
  import dll_pkg::*;
#(
  parameter real PHY_CDN_PS   = 150.0,
  parameter real NODE_CDN_PS  = 150.0,
  parameter real WINDOW_DT_PS = 8.0
) (
  input  logic                clk_2ui,
  input  logic                clk_ref,
  input  logic                rst_n,
  output logic                clk_8ui,
  output logic                clk_phy,
  output logic                clk_node,
  output logic                locked,
  output logic                coarse_done,
  output logic [COARSE_W-1:0] coarse_code,
  output logic [FINE_W-1:0]   fine_code
);
  timeunit 1ps; timeprecision 10fs;

  logic                     clk_4ui;
  logic                     shift_req_tgl;
  logic [COARSE_STAGES-1:0] c, c_bar;
  logic [FINE_LEGS-1:0]     fine_thermal;
  logic                     clk_coarse, clk_fine;
  logic                     clk_ref_d, clk_phy_d;
  logic                     up, down, pre_lock, lock, half_lock;
  dll_state_e               state;

  freq_divider u_div (
    .clk_2ui(clk_2ui), .rst_n(rst_n), .shift_req_tgl(shift_req_tgl),
    .clk_4ui(clk_4ui), .clk_8ui(clk_8ui)
  );

  coarse_thermal_encoder #(.STAGES(COARSE_STAGES)) u_cenc (
    .code(coarse_code), .c(c), .c_bar(c_bar)
  );

  coarse_delay_line #(.STAGES(COARSE_STAGES)) u_cdl (
    .cin(clk_8ui), .c(c), .c_bar(c_bar), .cout(clk_coarse)
  );

  fine_thermal_encoder #(.N_FDU(FDU_COUNT), .FDU_LEGS(FDU_LEGS)) u_fenc (
    .fine_code(fine_code), .fine_thermal(fine_thermal)
  );

  fine_delay_line #(.N_FDU(FDU_COUNT), .FDU_LEGS(FDU_LEGS)) u_fdl (
    .clock_in(clk_coarse), .fine_thermal(fine_thermal), .delayed_clock(clk_fine)
  );

  clock_distribution #(.INSERTION_PS(PHY_CDN_PS)) u_phy_cdn (
    .clk_in(clk_fine), .clk_leaf(clk_phy)
  );

  clock_distribution #(.INSERTION_PS(NODE_CDN_PS)) u_node_cdn (
    .clk_in(clk_fine), .clk_leaf(clk_node)
  );

  pd_delay_cell #(.DELAY_PS(WINDOW_DT_PS)) u_d2 (.a(clk_ref), .y(clk_ref_d));
  pd_delay_cell #(.DELAY_PS(WINDOW_DT_PS)) u_d1 (.a(clk_phy), .y(clk_phy_d));

  phase_detector u_pd (
    .clk_ref(clk_ref), .clk_ref_d(clk_ref_d),
    .clk_out(clk_phy), .clk_out_d(clk_phy_d),
    .rst_n(rst_n),
    .up(up), .down(down), .pre_lock(pre_lock),
    .lock(lock), .half_lock(half_lock)
  );

  dll_controller u_ctrl (
    .clk(clk_ref), .rst_n(rst_n),
    .up(up), .lock(lock), .half_lock(half_lock),
    .coarse_code(coarse_code), .fine_code(fine_code),
    .shift_req_tgl(shift_req_tgl), .locked(locked),
    .coarse_done(coarse_done), .state(state)
  );

  // down, pre_lock and clk_4ui are observable inside; the controller uses up.
  logic unused;
  assign unused = down ^ pre_lock ^ clk_4ui ^ (state == ST_WAIT);

endmodule
