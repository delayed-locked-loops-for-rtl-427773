// coarse_delay_line_tb: drives a 1.4 GHz clock through the coarse line for
// every thermometer setting and checks the rising-edge delay against
// (selected elements) * 7 ps, worked out here from the code. Also checks
// that C0 alone gives one element, that a stage counts only with C set and
// C_bar clear, and that with no stage selected the output does not move.
module coarse_delay_line_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T = 714.4;
  logic cin = 1'b0, cout;
  logic [31:0] c = 32'h1, c_bar = ~32'h1;
  int checks = 0, failures = 0;
  real t_in, t_out;

  coarse_delay_line dut (.cin(cin), .c(c), .c_bar(c_bar), .cout(cout));

  always #(T / 2.0) cin = ~cin;
  always @(posedge cin)  t_in  = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic measure(input real expect_ps, input string what);
    repeat (2) @(posedge cin);
    @(posedge cout);
    t_out = $realtime;
    check(((t_out - t_in) - expect_ps < 0.05) && (expect_ps - (t_out - t_in) < 0.05),
          $sformatf("%s: delay %0.2f expected %0.2f", what, t_out - t_in, expect_ps));
  endtask

  initial begin
    // Shortest path: C = 1000..0, C_bar = 0111..1.
    measure(7.0, "C0 only");
    for (int k = 0; k < 32; k++) begin
      @(negedge cin);
      for (int i = 0; i < 32; i++) c[i] = (i <= k);
      c_bar = ~c;
      measure(7.0 * (k + 1), $sformatf("thermometer %0d", k));
    end
    // C set but C_bar also set: stage not selected.
    @(negedge cin);
    c = 32'h0000_00FF; c_bar = 32'hFFFF_FFF0;
    measure(4 * 7.0, "C_bar masks stages");
    // No path: output holds.
    @(negedge cin);
    c = '0; c_bar = '1;
    repeat (2) @(posedge cin);
    begin
      automatic logic held = cout;
      automatic int moves = 0;
      repeat (4) begin @(posedge cin); #(T / 4.0); if (cout != held) moves++; end
      check(moves == 0, "no selected stage: output holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(500.0 * T);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
