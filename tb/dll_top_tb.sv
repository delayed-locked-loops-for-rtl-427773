// dll_top_tb: end-to-end test of the all-digital DLL at its default sizes.
//
// The testbench makes the 2UI clock (5.6 GHz) and a 1.4 GHz reference whose
// phase it places, after each reset, relative to the first rising edge of
// the divided 8UI clock. It predicts the loop delay independently from the
// line models (coarse: (k+1) * 7 ps; fine: 184 ps less 1/2/3 ps per enabled
// leg; PHY network 150 ps) and runs these scenarios:
//   S1  reference already inside the lock window: locks on the first check
//       with no code change;
//   S2  reference later than the start delay: coarse steps up, then fine;
//   S3  reference earlier: coarse steps down, then fine;
//   S4  reference 180 degrees off: one half-period slip of the divider, then
//       locked with no code change;
//   S5  after S2, the reference drifts +20 ps, then -40 ps: the coarse code
//       stays frozen and the fine code alone re-locks (up, then down).
// Each lock must come within 96 reference cycles (the design's worst-case
// lock time) and leave |phase error| below the 8 ps half-window. Every
// mechanism (first-check lock, half slip, coarse up/down, fine up/down,
// re-lock by fine only) must occur at least once.
module dll_top_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T2     = 178.6;        // 2UI period, ps
  localparam real T8     = 4.0 * T2;     // 8UI / reference period, ps
  localparam real DT     = 8.0;          // lock half-window, ps
  localparam real CDN    = 150.0;
  localparam int  MAX_LOCK_CYCLES = 96;

  logic clk_2ui = 1'b0;
  logic clk_ref = 1'b0;
  logic rst_n   = 1'b1;
  logic clk_8ui, clk_phy, clk_node, locked, coarse_done;
  logic [4:0] coarse_code;
  logic [5:0] fine_code;

  int checks = 0, failures = 0;
  int n_first_lock = 0, n_half = 0, n_cup = 0, n_cdown = 0;
  int n_fup = 0, n_fdown = 0, n_relock_fine = 0;

  dll_top dut (
    .clk_2ui(clk_2ui), .clk_ref(clk_ref), .rst_n(rst_n),
    .clk_8ui(clk_8ui), .clk_phy(clk_phy), .clk_node(clk_node),
    .locked(locked), .coarse_done(coarse_done),
    .coarse_code(coarse_code), .fine_code(fine_code)
  );

  always #(T2 / 2.0) clk_2ui = ~clk_2ui;

  // Reference generator: started by start_ref at time ref_t0, period T8,
  // with ref_shift added to every later edge.
  bit  ref_run = 1'b0;
  real ref_t0, ref_shift = 0.0;
  initial begin
    forever begin
      wait (ref_run);
      #(ref_t0 - $realtime);
      while (ref_run) begin
        clk_ref = 1'b1;
        #(T8 / 2.0);
        clk_ref = 1'b0;
        #(T8 / 2.0 + ref_shift);
        ref_shift = 0.0;
      end
    end
  end

  // Independent delay prediction.
  function automatic real fine_ps(int f);
    real d = 184.0;                          // all legs off
    for (int k = f; k < 64; k++)             // legs f..63 of the fill order are on
      d -= (k < 20) ? 1.0 : (k < 40) ? 2.0 : 3.0;
    return d;
  endfunction
  function automatic real path_ps(int c, int f);
    return real'(c + 1) * 7.0 + fine_ps(f) + CDN;
  endfunction

  // Phase error: reference edge minus latest PHY clock edge, wrapped.
  real t_phy = 0.0, err = 0.0;
  always @(posedge clk_phy) t_phy = $realtime;
  always @(posedge clk_ref) begin
    err = $realtime - t_phy;
    while (err > T8 / 2.0) err -= T8;
  end

  // Mechanism counters.
  logic [4:0] c_prev; logic [5:0] f_prev; logic tgl_prev;
  always @(posedge clk_ref) begin
    if (rst_n) begin
      if (coarse_code == c_prev + 5'd1) n_cup++;
      if (coarse_code == c_prev - 5'd1) n_cdown++;
      if (fine_code == f_prev + 6'd1) n_fup++;
      if (fine_code == f_prev - 6'd1) n_fdown++;
      if (dut.shift_req_tgl != tgl_prev) n_half++;
    end
    c_prev = coarse_code; f_prev = fine_code; tgl_prev = dut.shift_req_tgl;
  end

  always @(posedge clk_ref) if ($test$plusargs("trace"))
    $display("%0t st=%0d up=%0b lk=%0b hl=%0b a=%0b b=%0b c=%0d f=%0d err=%0.2f", $time, dut.u_ctrl.state,
      dut.up, dut.lock, dut.half_lock, dut.u_pd.win_a, dut.u_pd.win_b, coarse_code, fine_code, err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t coarse=%0d fine=%0d err=%0.2f)", what, $time,
               coarse_code, fine_code, err);
    end
  endtask

  // Reset, then start the reference 'target' ps after the first 8UI edge.
  task automatic start(input real target);
    ref_run = 1'b0;
    #(T8);
    rst_n   = 1'b0;
    repeat (3) begin
      #(T8 / 2.0) clk_ref = 1'b1;
      #(T8 / 2.0) clk_ref = 1'b0;
    end
    @(negedge clk_2ui) rst_n = 1'b1;
    @(posedge clk_8ui);
    while (target >= T8) target -= T8;
    ref_t0  = $realtime + target + T8;
    ref_run = 1'b1;
  endtask

  // Wait for lock; return reference cycles counted from the first edge.
  task automatic wait_lock(input string name, output int cycles);
    cycles = 0;
    while (!locked && cycles < 400) begin
      @(posedge clk_ref);
      cycles++;
    end
    $display("%s: locked after %0d reference cycles, coarse %0d fine %0d", name, cycles,
             coarse_code, fine_code);
    check(locked, {name, ": locks"});
    check(cycles <= MAX_LOCK_CYCLES, $sformatf("%s: locks within %0d cycles (took %0d)",
          name, MAX_LOCK_CYCLES, cycles));
    // Stay locked and aligned for a while.
    repeat (8) begin
      @(posedge clk_ref); #1;
      check(locked, {name, ": stays locked"});
      check(err < DT && err > -DT, $sformatf("%s: |phase error| %0.2f < %0.1f ps", name, err, DT));
    end
  endtask

  real p0;
  int  cyc;
  logic [4:0] c_lock;

  initial begin
    p0 = path_ps(16, 32);                 // start codes: coarse mid, fine mid
    $display("start path delay %0.2f ps", p0);

    // S1: already locked.
    start(p0 + 2.3);
    wait_lock("S1", cyc);
    check(coarse_code == 5'd16 && fine_code == 6'd32, "S1: codes unchanged");
    check(coarse_done, "S1: coarse stage marked done");
    if (coarse_code == 5'd16 && fine_code == 6'd32) n_first_lock++;

    // S2: more delay needed.
    start(p0 + 80.3);
    wait_lock("S2", cyc);
    check(coarse_code > 5'd16, "S2: coarse code went up");
    check(path_ps(int'(coarse_code), int'(fine_code)) > p0 + 80.3 - DT - 0.1 &&
          path_ps(int'(coarse_code), int'(fine_code)) < p0 + 80.3 + DT + 0.1,
          "S2: predicted path matches the reference phase");

    // S5: drift after lock; coarse frozen, fine re-locks.
    c_lock = coarse_code;
    ref_shift = 20.0;
    @(posedge clk_ref); @(posedge clk_ref);
    repeat (3) @(posedge clk_ref);
    check(!locked || (err < DT && err > -DT), "S5: drift seen or still in window");
    wait_lock("S5a", cyc);
    check(coarse_code == c_lock, "S5a: coarse code frozen");
    if (coarse_code == c_lock) n_relock_fine++;
    ref_shift = -40.0;
    repeat (5) @(posedge clk_ref);
    wait_lock("S5b", cyc);
    check(coarse_code == c_lock, "S5b: coarse code frozen");

    // S3: less delay needed.
    start(p0 - 90.3);
    wait_lock("S3", cyc);
    check(coarse_code < 5'd16, "S3: coarse code went down");

    // S4: 180 degrees off.
    start(p0 + T8 / 2.0 + 3.1);
    wait_lock("S4", cyc);
    check(coarse_code == 5'd16 && fine_code == 6'd32, "S4: codes unchanged after slip");
    check(cyc <= 14, $sformatf("S4: slip locks in 14 cycles (took %0d)", cyc));

    // Every mechanism happened.
    $display("mechanisms: first_lock=%0d half_slip=%0d coarse_up=%0d coarse_down=%0d fine_up=%0d fine_down=%0d relock_fine=%0d",
             n_first_lock, n_half, n_cup, n_cdown, n_fup, n_fdown, n_relock_fine);
    check(n_first_lock > 0, "mechanism: lock on first check");
    check(n_half == 1,      "mechanism: exactly one half-period slip");
    check(n_cup > 0,        "mechanism: coarse up");
    check(n_cdown > 0,      "mechanism: coarse down");
    check(n_fup > 0,        "mechanism: fine up");
    check(n_fdown > 0,      "mechanism: fine down");
    check(n_relock_fine > 0,"mechanism: re-lock by fine code only");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #(5000.0 * T8);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
