// bb_phase_detector_tb: sweeps the phase of clk_out against clk_ref across
// a whole period and checks the bang-bang decision one reference edge
// later: UP when clk_out's rising edge comes first by less than half a
// period, DOWN otherwise, DOWN always the complement, and both cleared by
// reset.
module bb_phase_detector_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T = 714.4;
  logic clk_ref = 1'b0, clk_out = 1'b0, rst_n = 1'b1;
  logic up, down;
  real  phi = -100.0;         // lead of clk_out over clk_ref, ps
  int checks = 0, failures = 0;

  bb_phase_detector dut (.clk_ref(clk_ref), .clk_out(clk_out), .rst_n(rst_n),
                         .up(up), .down(down));

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
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #(0.3 * T);
    check(up == 1'b0 && down == 1'b1, "reset: DOWN");
    rst_n = 1'b1;
    // phi = clk_out lead = T - dly, swept over the period.
    for (phi = -T / 2.0 + 3.37; phi < T / 2.0 - 1.0; phi += 6.91) begin
      repeat (3) @(posedge clk_ref);
      #1;
      check(up == (phi > 0.0), $sformatf("phi %0.2f: up=%0b", phi, up));
      check(down == !up, "down is the complement");
    end
    rst_n = 1'b0; #1;
    check(up == 1'b0, "reset clears");
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
