// tb_alarm: setting the alarm hour and minute in both formats, the alarm
// output over a sweep of clock times, and its suppression while setting.
module tb_alarm;
  logic clk = 0, rst = 1;
  logic setalm = 0, sethr = 0, setmin = 0, inc = 0, fmt24 = 1;
  logic [5:0] hour = 0, minute = 0, second = 0, alm_hour, alm_minute;
  logic alarmout;
  int checks = 0, failures = 0;
  int exp_h = 0, exp_m = 0, fires = 0;

  alarm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_inc();
    inc <= 1; @(posedge clk); inc <= 0; @(posedge clk); #1;
  endtask

  task automatic expect_alarm(input string what);
    checks++;
    if (alm_hour != 6'(exp_h) || alm_minute != 6'(exp_m)) begin
      failures++;
      $display("%s: alarm %0d:%0d expected %0d:%0d", what, alm_hour, alm_minute, exp_h, exp_m);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    expect_alarm("reset");
    // inc without setalm does nothing.
    sethr = 1; setmin = 1; pulse_inc(); expect_alarm("no setalm");
    setmin = 0;
    setalm = 1;
    // 24-hour: 26 presses wraps past 23.
    for (int k = 0; k < 26; k++) begin pulse_inc(); exp_h = (exp_h + 1) % 24; expect_alarm("hr24"); end
    // 12-hour: hour wraps after 11.
    fmt24 = 0;
    for (int k = 0; k < 14; k++) begin
      pulse_inc(); exp_h = (exp_h >= 11) ? 0 : exp_h + 1; expect_alarm("hr12");
    end
    fmt24 = 1;
    sethr = 0; setmin = 1;
    for (int k = 0; k < 75; k++) begin pulse_inc(); exp_m = (exp_m + 1) % 60; expect_alarm("min"); end
    // Now the alarm is exp_h:exp_m. Check: match while setting does not fire.
    hour = 6'(exp_h); minute = 6'(exp_m); second = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (alarmout) begin failures++; $display("alarm fired while setting"); end
    setalm = 0; sethr = 0; setmin = 0;
    // Sweep the clock over an hour on each side of the alarm and compare.
    for (int t = (exp_h * 60 + exp_m - 3) * 60; t < (exp_h * 60 + exp_m + 3) * 60; t++) begin
      int tt;
      tt = (t + 86400) % 86400;
      hour = 6'(tt / 3600); minute = 6'((tt / 60) % 60); second = 6'(tt % 60);
      @(posedge clk); #1;
      checks++;
      if (alarmout != (tt == (exp_h * 60 + exp_m) * 60)) begin
        failures++;
        $display("alarmout=%0b at %0d:%0d:%0d", alarmout, hour, minute, second);
      end
      if (alarmout) fires++;
    end
    checks++;
    if (fires != 1) begin failures++; $display("alarm fired %0d times", fires); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
