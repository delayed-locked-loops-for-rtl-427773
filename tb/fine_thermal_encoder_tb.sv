// fine_thermal_encoder_tb: exhaustive check of the fine code to
// Fine_thermal mapping. The expected bus is built here from the fill order
// the design describes: group 1 (5 legs) of FDU 0, 1, 2, 3, then group 2
// (5 legs) of each FDU, then group 3 (6 legs); FDU f owns bits
// [16f+15:16f], with groups at slice offsets 0, 5 and 10. Code f switches
// off the first f legs of that order and leaves the others on.
module fine_thermal_encoder_tb;
  timeunit 1ps; timeprecision 10fs;

  logic [5:0]  code;
  logic [63:0] ft;
  int checks = 0, failures = 0;
  int order[$];

  fine_thermal_encoder dut (.fine_code(code), .fine_thermal(ft));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // Fill order.
    for (int g = 0; g < 3; g++)
      for (int f = 0; f < 4; f++)
        for (int j = 0; j < ((g == 2) ? 6 : 5); j++)
          order.push_back(16 * f + 5 * g + j);
    check(order.size() == 64, "64 legs");

    for (int k = 0; k < 64; k++) begin
      automatic logic [63:0] e = '0;
      code = 6'(k); #10;
      e = '0;
      for (int i = k; i < 64; i++) e[order[i]] = 1'b1;
      check(ft == e, $sformatf("code %0d: bus %h expected %h", k, ft, e));
    end
    // Spot checks of the example the design gives: codes [4:0] switch
    // group 1 of the first FDU, codes [9:5] group 1 of the second.
    code = 6'd0; #10;
    check(ft == '1, "shortest delay: all legs on");
    code = 6'd5; #10;
    check(ft == 64'hFFFF_FFFF_FFFF_FFE0, "codes 0..4: FDU 0 group 1 off");
    code = 6'd10; #10;
    check(ft == 64'hFFFF_FFFF_FFE0_FFE0, "codes 5..9: FDU 1 group 1 off");
    code = 6'd63; #10;
    check(ft == 64'h8000_0000_0000_0000, "longest delay: last group-3 leg of FDU 3 only");
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
