// coarse_thermal_encoder_tb: exhaustive check of the coarse code to
// thermometer mapping. Code 0 must give the design's shortest-path pattern
// C = 1000..0 / C_bar = 0111..1; code k must set exactly C[0..k], and
// C_bar must be the complement.
module coarse_thermal_encoder_tb;
  timeunit 1ps; timeprecision 10fs;

  logic [4:0]  code;
  logic [31:0] c, c_bar;
  int checks = 0, failures = 0;

  coarse_thermal_encoder dut (.code(code), .c(c), .c_bar(c_bar));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    code = 5'd0; #10;
    check(c[4:0] == 5'b00001 && c_bar[4:0] == 5'b11110, "code 0: C0..C4 = 1 0 0 0 0");
    for (int k = 0; k < 32; k++) begin
      logic [31:0] e;
      code = 5'(k); #10;
      e = (k == 31) ? 32'hFFFF_FFFF : ((32'h1 << (k + 1)) - 1);
      check(c == e, $sformatf("code %0d: C = %h expected %h", k, c, e));
      check(c_bar == ~e, $sformatf("code %0d: C_bar complement", k));
      check($countones(c) == k + 1, $sformatf("code %0d: %0d elements", k, k + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
