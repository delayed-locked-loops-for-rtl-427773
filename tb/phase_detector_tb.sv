// phase_detector_tb: sweeps the phase error phi (clk_out lead over
// clk_ref) across a whole period with an 8 ps window skew and checks the
// synchronized outputs: UP for 0 < phi < T/2; LOCK only for |phi| < 8 ps;
// HALF_LOCK only within 8 ps of a half period; never both. It also checks
// that the raw pre-lock flag glitches when the phase jumps across the
// window while the synchronized LOCK stays clean (the glitch the
// synchronizer removes), and that a comparison shows half a period later.
module phase_detector_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T  = 714.4;
  localparam real DT = 8.0;
  logic clk_ref = 1'b0, clk_ref_d = 1'b0, clk_out = 1'b0, clk_out_d = 1'b0;
  logic rst_n = 1'b1;
  logic up, down, pre_lock, lock, half_lock;
  real  phi = -100.0;         // lead of clk_out over clk_ref, ps
  int checks = 0, failures = 0;
  int n_lock = 0, n_half = 0, n_glitch = 0, n_lock_glitch = 0;

  phase_detector dut (.clk_ref(clk_ref), .clk_ref_d(clk_ref_d), .clk_out(clk_out),
                      .clk_out_d(clk_out_d), .rst_n(rst_n), .up(up), .down(down),
                      .pre_lock(pre_lock), .lock(lock), .half_lock(half_lock));

  always #(T / 2.0) clk_ref = ~clk_ref;
  // clk_out is clk_ref shifted earlier by phi: it toggles at m*T/2 - phi,
  // high for odd m, the same as clk_ref at m*T/2.
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset

  initial begin
    forever begin
      automatic real n = $floor(($realtime + phi) / (T / 2.0) + 1.0e-3) + 1.0;
      #(n * (T / 2.0) - phi - $realtime);
      clk_out = ((longint'(n) % 2) != 0);
    end
  end
  always @(clk_ref) clk_ref_d <= #(DT) clk_ref;
  always @(clk_out) clk_out_d <= #(DT) clk_out;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Glitch watch: pre_lock pulses shorter than DT + 1 ps while LOCK is low.
  real t_pl, t_step;
  always @(posedge pre_lock) t_pl = $realtime;
  always @(negedge pre_lock) if (rst_n && $realtime - t_pl < DT + 1.0) begin
    n_glitch++;
    if (lock) n_lock_glitch++;
  end

  initial begin
    #(0.3 * T);
    check(!lock && !half_lock && !up, "reset values");
    rst_n = 1'b1;
    for (phi = -T / 2.0 + 1.13; phi < T / 2.0; phi += 2.71) begin
      bit e_up, e_lock, e_half;
      repeat (4) @(posedge clk_ref);
      #1;
      e_up   = (phi > 0.0);
      e_lock = absr(phi) < DT;
      e_half = absr(absr(phi) - T / 2.0) < DT;
      check(up == e_up,         $sformatf("phi %0.2f: up=%0b", phi, up));
      check(down == !up,        "down is the complement");
      check(lock == e_lock,     $sformatf("phi %0.2f: lock=%0b", phi, lock));
      check(half_lock == e_half,$sformatf("phi %0.2f: half=%0b", phi, half_lock));
      check(!(lock && half_lock), "lock and half-lock exclusive");
      n_lock += lock; n_half += half_lock;
    end
    check(n_lock >= 4, "lock window seen");
    check(n_half >= 2, "half-cycle window seen");
    check(n_lock_glitch == 0, "no glitch while LOCK is set");

    // A jump across the whole window flips both comparators dt apart:
    // pre-lock glitches, the synchronized LOCK does not.
    n_glitch = 0;
    @(negedge clk_ref) phi = -200.0;
    repeat (4) @(posedge clk_ref);
    @(negedge clk_ref) phi = 100.0;
    repeat (3) @(posedge clk_ref);
    check(n_glitch > 0, "raw pre-lock glitch on a jump across the window");
    check(n_lock_glitch == 0 && !lock, "synchronized LOCK stays low");

    // Latency: the comparison at a rising edge shows after the next falling
    // edge, before the following rising edge.
    @(negedge clk_ref) phi = 2.2;
    t_step = $realtime;
    fork
      @(posedge lock);
      #(3.0 * T);
    join_any
    check(lock, "locks after the step");
    check(clk_ref == 1'b0, "LOCK changes on a falling edge of clk_ref");
    check($realtime - t_step < 2.0 * T + 1.0, "LOCK within two periods of the step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3000.0 * T);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
