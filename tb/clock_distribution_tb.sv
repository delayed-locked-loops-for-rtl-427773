// clock_distribution_tb: checks the distribution-network model's insertion
// delay on both edges: 150 ps by default, and an overridden value.
module clock_distribution_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T = 714.4;
  logic clk = 1'b0, leaf, leaf2;
  int checks = 0, failures = 0;
  real tr, tf;

  clock_distribution dut (.clk_in(clk), .clk_leaf(leaf));
  clock_distribution #(.INSERTION_PS(230.0)) dut2 (.clk_in(clk), .clk_leaf(leaf2));

  always #(T / 2.0) clk = ~clk;
  always @(posedge clk) tr = $realtime;
  always @(negedge clk) tf = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic bit near(real x, real z);
    return (x - z < 0.05) && (z - x < 0.05);
  endfunction

  initial begin
    repeat (10) begin
      @(posedge leaf);  check(near($realtime - tr, 150.0), "rise 150 ps");
      @(posedge leaf2); check(near($realtime - tr, 230.0), "override rise 230 ps");
      @(negedge leaf);  check(near($realtime - tf, 150.0), "fall 150 ps");
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
