// pd_delay_cell_tb: checks that the window delay cell delays both edges of
// a clock by its 8 ps default (lock window +/- 8 ps) and that an override
// to 10 ps (a 20 ps window, the widest the design reports) is honoured.
module pd_delay_cell_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T = 714.4;
  logic a = 1'b0, y, y10;
  int checks = 0, failures = 0;
  real ta_r, ta_f;

  pd_delay_cell dut (.a(a), .y(y));
  pd_delay_cell #(.DELAY_PS(10.0)) dut10 (.a(a), .y(y10));

  always #(T / 2.0) a = ~a;
  always @(posedge a) ta_r = $realtime;
  always @(negedge a) ta_f = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic bit near(real x, real z);
    return (x - z < 0.05) && (z - x < 0.05);
  endfunction

  initial begin
    repeat (10) begin
      @(posedge y);   check(near($realtime - ta_r, 8.0),  "rising edge delayed 8 ps");
      @(negedge y);   check(near($realtime - ta_f, 8.0),  "falling edge delayed 8 ps");
      @(posedge y10); check(near($realtime - ta_r, 10.0), "override: 10 ps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100.0 * T);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
