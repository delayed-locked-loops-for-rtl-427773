// dll_lock_sweep_tb: lock-time and capture-range sweep of the whole DLL.
//
// For each of two reference rates (1.4 GHz, the design point, and 1.2 GHz,
// the low end of the link's rate range) the testbench resets the DLL 24
// times, each time placing the reference at a different phase, in steps
// of 1/24 period, after the first edge of the divided 8UI clock. From the
// line models it predicts independently which phases the control flow can
// reach:
//   * within the coarse range: coarse steps of 7 ps from the mid code, fine
//     at its mid code, reach path delays (k+1)*7 + 96 + 150 ps, k = 0..31;
//     such a phase must lock within 96 reference cycles (the design's
//     worst-case lock time) with |phase error| below 8 ps;
//   * at 180 degrees from the start delay: the half-cycle slip catches it;
//   * anywhere else the coarse code runs into an end of its range and the
//     loop does not lock. The control flow checks for a half-cycle error
//     only once, after reset, so this is a property of the flow, not a
//     fault; the testbench checks that the code saturates and counts it.
// Phases within 12 ps of a range edge are not classified (the window edge
// is +/- 8 ps), only checked for a clean lock if they lock.
// Mechanisms counted: first-check lock, half-cycle slip, coarse tracking
// lock, saturation at code 0 and at code 31.
module dll_lock_sweep_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real DT     = 8.0;
  localparam real CDN    = 150.0;
  localparam real MARGIN = 12.0;
  localparam int  MAX_LOCK_CYCLES = 96;
  localparam int  STEPS  = 24;

  real T2 = 178.6;                       // 2UI period, changed between sweeps
  real T8;

  logic clk_2ui = 1'b0;
  logic clk_ref = 1'b0;
  logic rst_n   = 1'b1;
  logic clk_8ui, clk_phy, clk_node, locked, coarse_done;
  logic [4:0] coarse_code;
  logic [5:0] fine_code;

  int checks = 0, failures = 0;
  int n_first = 0, n_half = 0, n_track = 0, n_sat_lo = 0, n_sat_hi = 0;
  int max_cycles = 0;

  dll_top dut (
    .clk_2ui(clk_2ui), .clk_ref(clk_ref), .rst_n(rst_n),
    .clk_8ui(clk_8ui), .clk_phy(clk_phy), .clk_node(clk_node),
    .locked(locked), .coarse_done(coarse_done),
    .coarse_code(coarse_code), .fine_code(fine_code)
  );

  always #(T2 / 2.0) clk_2ui = ~clk_2ui;

  bit  ref_run = 1'b0;
  real ref_t0;
  initial begin
    forever begin
      wait (ref_run);
      #(ref_t0 - $realtime);
      while (ref_run) begin
        clk_ref = 1'b1;
        #(T8 / 2.0);
        clk_ref = 1'b0;
        #(T8 / 2.0);
      end
    end
  end

  // Phase error: reference edge minus latest PHY clock edge, wrapped.
  real t_phy = 0.0, err = 0.0;
  always @(posedge clk_phy) t_phy = $realtime;
  always @(posedge clk_ref) begin
    err = $realtime - t_phy;
    while (err > T8 / 2.0) err -= T8;
  end

  // Loop delay at the start codes (fine mid = 96 ps) for coarse code k.
  function automatic real path_ps(int k);
    return real'(k + 1) * 7.0 + 96.0 + CDN;
  endfunction

  // Distance between two phases, modulo the period.
  function automatic real pdist(real a, real b);
    real d = a - b;
    while (d >  T8 / 2.0) d -= T8;
    while (d < -T8 / 2.0) d += T8;
    return (d < 0.0) ? -d : d;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t coarse=%0d fine=%0d err=%0.2f)", what, $time,
               coarse_code, fine_code, err);
    end
  endtask

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
    ref_t0  = $realtime + target + T8;
    ref_run = 1'b1;
  endtask

  // One sweep point. cls: 0 = coarse range, 1 = half-cycle, 2 = out of
  // reach, 3 = near an edge (not classified).
  task automatic run_point(input real target, input int cls);
    int  cyc = 0;
    bit  slipped;
    logic tgl0;
    start(target);
    tgl0 = dut.shift_req_tgl;
    while (!locked && cyc < MAX_LOCK_CYCLES + 24) begin
      @(posedge clk_ref);
      cyc++;
    end
    slipped = (dut.shift_req_tgl != tgl0);
    $display("T=%0.1f ps phase %6.1f ps class %0d: %s after %0d cycles, coarse %0d fine %0d%s",
             T8, target, cls, locked ? "locked" : "no lock", cyc, coarse_code, fine_code,
             slipped ? " (half-cycle slip)" : "");
    if (locked) begin
      repeat (4) begin
        @(posedge clk_ref); #1;
        check(locked && err < DT && err > -DT,
              $sformatf("phase %0.1f: stays locked, |error| %0.2f < %0.1f", target, err, DT));
      end
    end
    case (cls)
      0, 1: begin
        check(locked, $sformatf("phase %0.1f: locks", target));
        check(cyc <= MAX_LOCK_CYCLES,
              $sformatf("phase %0.1f: locks within %0d cycles (took %0d)", target,
                        MAX_LOCK_CYCLES, cyc));
        if (cyc > max_cycles) max_cycles = cyc;
        if (cls == 1) begin
          check(slipped, $sformatf("phase %0.1f: half-cycle slip used", target));
          n_half++;
        end else if (cyc <= 7) n_first++;
        else n_track++;
      end
      2: begin
        check(!locked, $sformatf("phase %0.1f: out of reach, no lock", target));
        check(coarse_code == 5'd0 || coarse_code == 5'd31,
              $sformatf("phase %0.1f: coarse code saturated", target));
        if (coarse_code == 5'd0)  n_sat_lo++;
        if (coarse_code == 5'd31) n_sat_hi++;
      end
      default: ;
    endcase
  endtask

  task automatic sweep(input real t2);
    real lo, hi, half, tgt;
    int  cls;
    T2   = t2;
    T8   = 4.0 * T2;
    lo   = path_ps(0);
    hi   = path_ps(31);
    half = path_ps(16) + T8 / 2.0;
    while (half >= T8) half -= T8;
    $display("sweep: period %0.1f ps, coarse reach %0.1f..%0.1f ps, half-cycle point %0.1f ps",
             T8, lo, hi, half);
    for (int i = 0; i < STEPS; i++) begin
      tgt = T8 * real'(i) / real'(STEPS) + 3.0;
      if (pdist(tgt, half) <= DT - 2.0)                      cls = 1;
      else if (pdist(tgt, half) < MARGIN)                    cls = 3;
      else if (tgt >= lo - DT + 2.0 && tgt <= hi + DT - 2.0) cls = 0;
      else if (tgt > lo - MARGIN && tgt < hi + MARGIN)       cls = 3;
      else                                                   cls = 2;
      run_point(tgt, cls);
    end
    // One point exactly on the half-cycle phase.
    run_point(half, 1);
  endtask

  initial begin
    T8 = 4.0 * T2;
    #1 rst_n = 1'b0;
    sweep(178.6);                        // 8UI clock 1.4 GHz
    sweep(208.3);                        // 8UI clock 1.2 GHz
    $display("worst lock time %0d cycles; first-check %0d, half-slip %0d, tracking %0d, saturated low %0d high %0d",
             max_cycles, n_first, n_half, n_track, n_sat_lo, n_sat_hi);
    check(n_first  > 0, "first-check lock seen");
    check(n_half   > 0, "half-cycle slip lock seen");
    check(n_track  > 0, "coarse/fine tracking lock seen");
    check(n_sat_lo > 0, "saturation at coarse code 0 seen");
    check(n_sat_hi > 0, "saturation at coarse code 31 seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60.0 * 150.0 * 900.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
