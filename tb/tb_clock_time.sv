// tb_clock_time: runs the time counter through more than a full day against a
// seconds-since-midnight reference, then checks stop, setting of hours and
// minutes with their wraps, and the 12-hour display folding.
module tb_clock_time;
  logic clk = 0, rst = 1;
  logic tick = 0, stop = 0, settime = 0, sethr = 0, setmin = 0, inc = 0, fmt24 = 1;
  logic [5:0] hour, hour24, minute, second;
  logic day_end;
  int checks = 0, failures = 0;
  int ref_t = 0;      // seconds since midnight
  int day_ends = 0;

  clock_time dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_time(input int t, input string what);
    int h, m, s, hd;
    h = t / 3600; m = (t / 60) % 60; s = t % 60;
    hd = fmt24 ? h : h % 12;
    checks++;
    if (hour24 != 6'(h) || minute != 6'(m) || second != 6'(s) || hour != 6'(hd)) begin
      failures++;
      $display("%s: got %0d(%0d):%0d:%0d expected %0d(%0d):%0d:%0d", what,
               hour24, hour, minute, second, h, hd, m, s);
    end
  endtask

  task automatic pulse_inc();
    inc <= 1; @(posedge clk); inc <= 0; @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    expect_time(0, "after reset");
    // A full day plus a little, one tick every second cycle; 12-hour display
    // for the second half of it.
    for (int i = 0; i < 86400 + 130; i++) begin
      if (i == 50000) fmt24 = 0;
      tick <= 1; @(posedge clk); tick <= 0; #1;
      ref_t = (ref_t + 1) % 86400;
      if (day_end) day_ends++;
      checks++;
      if (day_end != (ref_t == 0)) begin
        failures++;
        $display("day_end=%0b at t=%0d", day_end, ref_t);
      end
      if (i % 97 == 0 || ref_t < 3 || ref_t % 3600 == 0) expect_time(ref_t, "running");
      @(posedge clk); #1;
    end
    checks++;
    if (day_ends != 1) begin failures++; $display("day_end seen %0d times", day_ends); end
    fmt24 = 1;
    // Stop holds the time.
    stop = 1;
    repeat (20) begin tick <= 1; @(posedge clk); tick <= 0; @(posedge clk); end
    #1 expect_time(ref_t, "stopped");
    // inc without settime does nothing.
    sethr = 1; pulse_inc(); expect_time(ref_t, "inc without settime");
    // Set hours: 25 presses from the current hour wraps past 23.
    settime = 1;
    for (int k = 0; k < 25; k++) begin
      pulse_inc();
      ref_t = ((ref_t / 3600 + 1) % 24) * 3600 + ref_t % 3600;
      expect_time(ref_t, "set hour");
    end
    // Ticks while setting do nothing.
    tick <= 1; @(posedge clk); tick <= 0; #1; expect_time(ref_t, "tick while stopped");
    sethr = 0; setmin = 1;
    for (int k = 0; k < 61; k++) begin
      pulse_inc();
      ref_t = (ref_t / 3600) * 3600 + (((ref_t / 60) % 60 + 1) % 60) * 60 + ref_t % 60;
      expect_time(ref_t, "set minute");
    end
    checks++;
    if (day_ends != 1) begin failures++; $display("setting produced day_end"); end
    // 12-hour folding while set.
    fmt24 = 0; #1 expect_time(ref_t, "12-hour");
    // Both sethr and setmin change both.
    sethr = 1; pulse_inc();
    ref_t = ((ref_t / 3600 + 1) % 24) * 3600 + (((ref_t / 60) % 60 + 1) % 60) * 60 + ref_t % 60;
    expect_time(ref_t, "set both");
    // Release and run again.
    settime = 0; sethr = 0; setmin = 0; stop = 0;
    tick <= 1; @(posedge clk); tick <= 0; #1;
    ref_t = (ref_t + 1) % 86400;
    expect_time(ref_t, "resumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
