// freq_divider_tb: checks the 2UI -> 4UI -> 8UI divider and its half-period
// slip. After reset both outputs are low; the 4UI clock must have period
// 2*T2 and the 8UI clock period 4*T2 with 50 % duty. A toggle of
// shift_req_tgl must delay every later 8UI rising edge by exactly half an
// 8UI period, and only once per toggle.
module freq_divider_tb;
  timeunit 1ps; timeprecision 10fs;

  localparam real T2 = 178.6;
  localparam real T8 = 4.0 * T2;

  logic clk_2ui = 1'b0, rst_n = 1'b1, tgl = 1'b0;
  logic clk_4ui, clk_8ui;
  int checks = 0, failures = 0;

  freq_divider dut (.clk_2ui(clk_2ui), .rst_n(rst_n), .shift_req_tgl(tgl),
                    .clk_4ui(clk_4ui), .clk_8ui(clk_8ui));

  always #(T2 / 2.0) clk_2ui = ~clk_2ui;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 0.05) && (b - a < 0.05);
  endfunction

  real t_r8[$], t_f8[$], t_r4[$];
  always @(posedge clk_8ui) t_r8.push_back($realtime);
  always @(negedge clk_8ui) t_f8.push_back($realtime);
  always @(posedge clk_4ui) if (rst_n) t_r4.push_back($realtime);

  real t_last;
  int  n0;

  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset

  initial begin
    #(2.3 * T2);
    check(clk_8ui == 1'b0, "8UI low in reset");
    check(clk_4ui == 1'b1, "4UI clock is inverted first stage, high in reset");
    @(negedge clk_2ui) rst_n = 1'b1;
    repeat (40) @(posedge clk_2ui);
    // Periods and duty.
    for (int i = 1; i < t_r4.size(); i++)
      check(near(t_r4[i] - t_r4[i-1], 2.0 * T2), "4UI period");
    for (int i = 1; i < t_r8.size(); i++)
      check(near(t_r8[i] - t_r8[i-1], T8), "8UI period");
    for (int i = 0; i < t_f8.size() && i < t_r8.size(); i++)
      check(near(t_f8[i] - t_r8[i], T8 / 2.0), "8UI duty 50 %");
    // First 8UI rising edge: second rising edge of the 4UI clock.
    check(t_r8.size() > 0 && t_r4.size() > 1 && near(t_r8[0], t_r4[0]),
          "8UI first rises on the first 4UI rising edge after reset");

    // Slip.
    n0 = t_r8.size();
    t_last = t_r8[n0 - 1];
    @(negedge clk_2ui) tgl = ~tgl;
    repeat (40) @(posedge clk_2ui);
    check(t_r8.size() > n0 + 2, "8UI keeps running after slip");
    // Exactly one gap of 1.5 periods, all others one period.
    begin
      automatic int n_slip = 0;
      for (int i = n0; i < t_r8.size(); i++) begin
        automatic real d = t_r8[i] - ((i == n0) ? t_last : t_r8[i-1]);
        if (near(d, 1.5 * T8)) n_slip++;
        else check(near(d, T8), $sformatf("8UI period outside slip: %0.2f", d));
      end
      check(n_slip == 1, "exactly one half-period slip per toggle");
    end
    // Latency: the slip is seen within four 8UI periods of the request.
    check(near(t_r8[n0] - t_last, 1.5 * T8) || near(t_r8[n0 + 1] - t_r8[n0], 1.5 * T8) ||
          near(t_r8[n0 + 2] - t_r8[n0 + 1], 1.5 * T8), "slip within three 8UI edges");

    // A second toggle gives a second slip.
    n0 = t_r8.size();
    @(negedge clk_2ui) tgl = ~tgl;
    repeat (40) @(posedge clk_2ui);
    begin
      automatic int n_slip = 0;
      for (int i = n0; i < t_r8.size(); i++)
        if (near(t_r8[i] - t_r8[i-1], 1.5 * T8)) n_slip++;
      check(n_slip == 1, "second toggle slips once");
    end

    // Reset clears the outputs.
    rst_n = 1'b0;
    #1;
    check(clk_8ui == 1'b0, "reset clears 8UI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000.0 * T2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
