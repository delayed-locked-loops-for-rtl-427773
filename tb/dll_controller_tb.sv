// dll_controller_tb: drives the control FSM with UP / LOCK / HALF_LOCK
// patterns and checks it against the control flow, with expected codes
// kept here by counting:
//   A  LOCK already set after reset: TRACK after WAIT_CYCLES + 2 edges,
//      codes untouched (coarse 16, fine 32), coarse stage done.
//   B  HALF_LOCK set: exactly one divider slip request, then WAIT_CYCLES
//      edges, coarse init, TRACK.
//   C  no flags: coarse steps +1 per cycle on UP, -1 without; fine frozen;
//      a LOCK freezes both and ends the coarse stage; after that only the
//      fine code moves, and it saturates at 0 and 63.
//   D  coarse saturates at 31.
module dll_controller_tb;
  timeunit 1ps; timeprecision 10fs;
  import dll_pkg::*;

  localparam real T = 714.4;
  localparam int  WAITC = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic up = 1'b0, lock = 1'b0, half = 1'b0;
  logic [4:0] coarse;
  logic [5:0] fine;
  logic tgl, locked, cdone;
  dll_state_e state;
  int checks = 0, failures = 0;

  dll_controller dut (.clk(clk), .rst_n(rst_n), .up(up), .lock(lock), .half_lock(half),
                      .coarse_code(coarse), .fine_code(fine), .shift_req_tgl(tgl),
                      .locked(locked), .coarse_done(cdone), .state(state));

  always #(T / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t (state=%s coarse=%0d fine=%0d)", what, $time, state.name(), coarse, fine);
    end
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
  endtask

  // n rising edges, inputs applied on the falling edge before them.
  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
    @(negedge clk);
  endtask

  int exp_c, exp_f;
  logic tgl0;

  initial begin
    // A: locked from the start.
    lock = 1'b1;
    do_reset();
    check(coarse == 5'd16 && fine == 6'd32 && state == ST_WAIT, "A: reset values");
    cycles(WAITC + 1);
    check(state == ST_CHECK_LOCK, "A: lock check after the wait");
    cycles(1);
    check(state == ST_TRACK && cdone && locked, "A: straight to tracking, locked");
    up = 1'b1;
    cycles(5);
    check(coarse == 5'd16 && fine == 6'd32, "A: codes held while locked");

    // B: half-cycle lock.
    lock = 1'b0; half = 1'b1; up = 1'b0;
    tgl0 = tgl;
    do_reset();
    check(!cdone, "B: reset clears coarse stage");
    cycles(WAITC + 2);
    check(state == ST_CHECK_HALF, "B: half-lock check");
    cycles(1);
    check(tgl != tgl0 && state == ST_SHIFT_WAIT, "B: slip requested");
    half = 1'b0;
    cycles(WAITC + 1);
    check(state == ST_COARSE_INIT, "B: coarse init after the wait");
    check(tgl != tgl0, "B: only one slip");
    cycles(1);
    check(state == ST_TRACK && coarse == 5'd16, "B: tracking from mid code");

    // C: coarse tracking then fine tracking.
    lock = 1'b0; half = 1'b0; up = 1'b1;
    do_reset();
    tgl0 = tgl;
    cycles(WAITC + 4);                   // wait, lock, half, init
    check(state == ST_TRACK && coarse == 5'd16, "C: tracking");
    exp_c = 16; exp_f = 32;
    for (int i = 0; i < 5; i++) begin cycles(1); exp_c++; check(coarse == 5'(exp_c), "C: coarse +1 on UP"); end
    up = 1'b0;
    for (int i = 0; i < 3; i++) begin cycles(1); exp_c--; check(coarse == 5'(exp_c), "C: coarse -1 on DOWN"); end
    check(fine == 6'd32, "C: fine frozen during coarse stage");
    check(tgl == tgl0, "C: no slip without half lock");
    lock = 1'b1;
    cycles(2);
    check(coarse == 5'(exp_c) && cdone && locked, "C: LOCK freezes codes, coarse done");
    lock = 1'b0; up = 1'b1;
    for (int i = 0; i < 3; i++) begin cycles(1); exp_f++; check(fine == 6'(exp_f), "C: fine +1 on UP"); end
    check(coarse == 5'(exp_c) && !locked, "C: coarse frozen after first lock");
    up = 1'b0;
    cycles(40);
    check(fine == 6'd0, "C: fine saturates at 0");
    up = 1'b1;
    cycles(70);
    check(fine == 6'd63, "C: fine saturates at 63");
    check(coarse == 5'(exp_c), "C: coarse still frozen");

    // D: coarse saturation.
    lock = 1'b0; up = 1'b1;
    do_reset();
    cycles(WAITC + 4 + 20);
    check(coarse == 5'd31, "D: coarse saturates at 31");
    up = 1'b0;
    cycles(40);
    check(coarse == 5'd0, "D: coarse saturates at 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * T);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
