// fine_delay_line_tb: drives a clock through the four-FDU fine line with
// corner and random 64-bit thermal buses and checks the total delay, the
// sum of four FDU delays (46 ps each less 1/2/3 ps per enabled group-1/2/3
// leg), worked out here from the bus. Also checks the 184 ps maximum and
// the intermediate tap after the first FDU, which is driven by
// Fine_thermal<63:48>.
module fine_delay_line_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T = 714.4;
  logic clk = 1'b0, dclk;
  logic [63:0] ft = '0;
  int checks = 0, failures = 0;
  real t_in, t_out, t_tap;

  fine_delay_line dut (.clock_in(clk), .fine_thermal(ft), .delayed_clock(dclk));

  always #(T / 2.0) clk = ~clk;
  always @(posedge clk)  t_in  = $realtime;
  always @(posedge dut.tap[3]) t_tap = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic real fdu_ps(logic [15:0] l);
    return 46.0 - 1.0 * $countones(l[4:0]) - 2.0 * $countones(l[9:5])
                - 3.0 * $countones(l[15:10]);
  endfunction

  function automatic bit near(real a, real b);
    return (a - b < 0.05) && (b - a < 0.05);
  endfunction

  task automatic try(input logic [63:0] b);
    real e;
    e = fdu_ps(b[15:0]) + fdu_ps(b[31:16]) + fdu_ps(b[47:32]) + fdu_ps(b[63:48]);
    @(negedge clk) ft = b;
    repeat (2) @(posedge clk);
    @(posedge dclk);
    t_out = $realtime;
    check(near(t_out - t_in, e), $sformatf("bus %h: delay %0.2f expected %0.2f", b, t_out - t_in, e));
    check(near(t_tap - t_in, fdu_ps(b[63:48])), "first FDU uses Fine_thermal<63:48>");
  endtask

  initial begin
    try('0);
    check(near(t_out - t_in, 184.0), "all legs off: 184 ps");
    try('1);
    try(64'h0000_0000_0000_FFFF);
    try(64'hFFFF_0000_0000_0000);
    repeat (40) try({$urandom, $urandom});
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
