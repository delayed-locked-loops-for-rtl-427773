// fine_delay_unit_tb: drives a clock through one FDU with random and corner
// leg patterns and checks the delay: 46 ps with no leg enabled, less 1 ps
// per group-1 leg (bits 4:0), 2 ps per group-2 leg (bits 9:5) and 3 ps per
// group-3 leg (bits 15:10), computed here from population counts.
module fine_delay_unit_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T = 714.4;
  logic in = 1'b0, out;
  logic [15:0] legs = '0;
  int checks = 0, failures = 0;
  real t_in, t_out;

  fine_delay_unit dut (.in(in), .legs(legs), .out(out));

  always #(T / 2.0) in = ~in;
  always @(posedge in)  t_in  = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic real expect_ps(logic [15:0] l);
    return 46.0 - 1.0 * $countones(l[4:0]) - 2.0 * $countones(l[9:5])
                - 3.0 * $countones(l[15:10]);
  endfunction

  task automatic try(input logic [15:0] l);
    @(negedge in) legs = l;
    repeat (2) @(posedge in);
    @(posedge out);
    t_out = $realtime;
    check(((t_out - t_in) - expect_ps(l) < 0.05) && (expect_ps(l) - (t_out - t_in) < 0.05),
          $sformatf("legs %h: delay %0.2f expected %0.2f", l, t_out - t_in, expect_ps(l)));
  endtask

  initial begin
    try(16'h0000);
    try(16'hFFFF);
    for (int j = 0; j < 16; j++) try(16'(1) << j);
    repeat (40) try(16'($urandom));
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
