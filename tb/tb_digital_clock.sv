// tb_digital_clock: end-to-end test of the whole clock through its pins.
//
// A reference model counts 1 Hz ticks from the cycle count alone and keeps
// the expected time, stopwatch and date; the testbench checks the binary
// seconds LEDs every cycle and reads the multiplexed display back through
// the anodes and segments. It walks through: running with second, minute and
// hour carries; stopping; setting hours and minutes with the increment
// button; the 12-hour format; setting the alarm and catching the alarm pulse;
// the end of a day advancing the date; the stopwatch with hold and its
// one-hour wrap; manual date adjustment with its 31-to-0 wrap; and a blank
// display for an invalid option; and a whole day in 12-hour mode, where the
// alarm fires twice. Each of these is counted and must happen.
// Small DIVISOR and REFRESH_BITS keep the run short.
module tb_digital_clock;
  import tb_seg_pkg::*;
  localparam int DIV = 64;
  localparam int RB  = 1;

  logic systemclock = 0, reset = 1;
  logic [3:0] Option = 4'b0001;
  logic Adate = 0, Format = 1, inct = 0, setalm = 0, sethr = 0, setmin = 0;
  logic settime = 0, stop = 0, strtstop = 0;
  logic [3:0] An;
  logic [5:0] sec;
  logic alarmout, ca, cb, cc, cd, ce, cf, cg, dot, dp;

  digital_clock #(.DIVISOR(DIV), .REFRESH_BITS(RB)) dut (.*);

  always #5 systemclock = ~systemclock;

  int checks = 0, failures = 0;
  // Mechanism counters
  int n_sec_carry = 0, n_min_carry = 0, n_hr_carry = 0, n_day_end = 0;
  int n_stop_hold = 0, n_set_hr = 0, n_set_min = 0, n_fmt12 = 0;
  int n_alarm_set = 0, n_alarm_fire = 0, n_sw_run = 0, n_sw_hold = 0, n_sw_wrap = 0;
  int n_date_adj = 0, n_date_wrap = 0, n_blank = 0, n_dot = 0, n_alarm12 = 0;

  // Reference model
  int cyc = 0;
  int ref_t = 0, ref_sw = 0, ref_date = 0;
  int alm_h = 0, alm_m = 0;
  int alarm_rise = -1, alarm_len = 0, pulse_count = 0;
  bit alarm_due = 0;
  bit prev_alarm = 0;
  bit prev_dot = 0;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int shown_hour(input int t);
    return Format ? t / 3600 : (t / 3600) % 12;
  endfunction

  always @(posedge systemclock) if (!reset) begin
    cyc++;
    // The alarm register samples the time seen in the cycle before.
    alarm_due = !setalm && shown_hour(ref_t) == alm_h && (ref_t / 60) % 60 == alm_m
                && ref_t % 60 == 0;
    if (cyc > 1 && cyc % DIV == 1) begin
      if (!stop) begin
        ref_t++;
        if (ref_t % 60 == 0) n_sec_carry++;
        if (ref_t % 3600 == 0) n_min_carry++;
        if (ref_t == 86400) begin ref_t = 0; ref_date = (ref_date + 1) % 32; n_day_end++; end
        if (ref_t % 3600 == 0) n_hr_carry++;
      end
      if (strtstop) begin
        ref_sw++;
        n_sw_run++;
        if (ref_sw == 3600) begin ref_sw = 0; n_sw_wrap++; end
      end else n_sw_hold++;
    end
  end

  // Every cycle: seconds LEDs and alarm output against the model.
  always @(posedge systemclock) if (!reset) begin
    #1;
    checks++;
    if (sec != 6'(ref_t % 60)) begin
      failures++;
      $display("cycle %0d: sec %0d expected %0d", cyc, sec, ref_t % 60);
    end
    if (alarmout != alarm_due) begin
      failures++;
      $display("cycle %0d: alarmout %0b expected %0b", cyc, alarmout, alarm_due);
    end
    if (alarmout && !prev_alarm) begin pulse_count++; n_alarm_fire++; end
    if (alarmout) alarm_len++;
    prev_alarm = alarmout;
    if (dot != prev_dot) n_dot++;
    prev_dot = dot;
  end

  // Read the four digits back from the scanned display.
  task automatic read_display(output int hi, output int lo, output logic [3:0] dps);
    logic [3:0][6:0] d;
    logic [3:0] got;
    got = '0; d = '0; dps = '0;
    repeat (4 * (1 << RB) + 2) begin
      @(posedge systemclock); #2;
      for (int k = 0; k < 4; k++) if (An == ~(4'b1 << k)) begin
        d[k] = {cg, cf, ce, cd, cc, cb, ca};
        dps[k] = !dp;
        got[k] = 1;
      end
    end
    if (got != 4'b1111) $display("not all digits scanned");
    hi = (ref_digit(d[3]) == -1 && ref_digit(d[2]) == -1) ? -1
         : ref_digit(d[3]) * 10 + ref_digit(d[2]);
    lo = (ref_digit(d[1]) == -1 && ref_digit(d[0]) == -1) ? -1
         : ref_digit(d[1]) * 10 + ref_digit(d[0]);
  endtask

  task automatic expect_display(input int hi, input int lo, input logic [3:0] dps,
                                input string what);
    int h, l;
    logic [3:0] p;
    read_display(h, l, p);
    checks++;
    if (h != hi || l != lo || p != dps) begin
      failures++;
      $display("%s: display %0d.%0d dp %b expected %0d.%0d dp %b", what, h, l, p, hi, lo, dps);
    end
  endtask

  // Wait until just after a tick edge, so a display read is not cut by one.
  task automatic sync_to_tick();
    while (cyc % DIV != 2) @(posedge systemclock);
    #2;
  endtask

  task automatic press(input int times);
    repeat (times) begin
      inct = 1; repeat (5) @(posedge systemclock);
      #1 inct = 0; repeat (5) @(posedge systemclock);
      #1;
    end
  endtask

  task automatic run_ticks(input int n);
    repeat (n * DIV) @(posedge systemclock);
    #1;
  endtask

  function automatic int t_of(input int h, input int m, input int s);
    return h * 3600 + m * 60 + s;
  endfunction

  initial begin
    int h, l;
    logic [3:0] p;
    repeat (3) @(posedge systemclock);
    #1 reset = 0;
    expect_display(0, 0, 4'b0100, "after reset");
    // Run past a minute carry.
    run_ticks(125);
    sync_to_tick();
    expect_display(0, ref_t / 60, 4'b0100, "running");
    // Stop: nothing moves.
    stop = 1;
    begin
      int t0;
      t0 = ref_t;
      run_ticks(5);
      checks++;
      if (ref_t != t0) begin failures++; $display("model moved while stopped"); end
      else n_stop_hold++;
    end
    // Set 23:58 with the button: hours from 0 to 23, minutes to 58.
    settime = 1; sethr = 1;
    press(23 - ref_t / 3600);
    ref_t = t_of(23, (ref_t / 60) % 60, ref_t % 60); n_set_hr++;
    expect_display(23, (ref_t / 60) % 60, 4'b0100, "set hour");
    // Setting without settime does nothing.
    settime = 0; press(2);
    expect_display(23, (ref_t / 60) % 60, 4'b0100, "inct without settime");
    settime = 1; sethr = 0; setmin = 1;
    press((58 - (ref_t / 60) % 60 + 60) % 60);
    ref_t = t_of(23, 58, ref_t % 60); n_set_min++;
    expect_display(23, 58, 4'b0100, "set minute");
    setmin = 0; settime = 0;
    // 12-hour format shows 11.
    Format = 0; #1;
    expect_display(11, 58, 4'b0100, "12-hour");
    n_fmt12++;
    Format = 1; #1;
    // Alarm to 23:59.
    setalm = 1; sethr = 1;
    press(23);
    setalm = 1; sethr = 0; setmin = 1;
    press(59);
    alm_h = 23; alm_m = 59;
    setalm = 0; setmin = 0;
    // Reset left the alarm at 00:00, which fired at once; count from here.
    pulse_count = 0; alarm_len = 0;
    Option = 4'b0100; #1;
    expect_display(23, 59, 4'b0100, "alarm display");
    n_alarm_set++;
    Option = 4'b0001; #1;
    // Run through the alarm and midnight; the stopwatch runs at the same time.
    strtstop = 1;
    stop = 0;
    run_ticks(120 - ref_t % 60 + 3);
    sync_to_tick();
    expect_display(0, 0, 4'b0100, "after midnight");
    checks++;
    if (pulse_count != 1 || alarm_len != DIV) begin
      failures++;
      $display("alarm pulses %0d, length %0d cycles (expected 1, %0d)", pulse_count, alarm_len, DIV);
    end
    Option = 4'b0010; #1;
    expect_display(-1, ref_date, 4'b0000, "date after midnight");
    checks++;
    if (ref_date != 1) begin failures++; $display("model date %0d", ref_date); end
    // Stopwatch: hold for a while, then run past its hour wrap.
    Option = 4'b1000; #1;
    sync_to_tick();
    expect_display(ref_sw / 60, ref_sw % 60, 4'b0100, "stopwatch");
    strtstop = 0;
    run_ticks(10);
    sync_to_tick();
    expect_display(ref_sw / 60, ref_sw % 60, 4'b0100, "stopwatch held");
    strtstop = 1;
    run_ticks(3600 - ref_sw + 5);
    sync_to_tick();
    expect_display(ref_sw / 60, ref_sw % 60, 4'b0100, "stopwatch wrapped");
    strtstop = 0;
    // Date adjust: needs stop, Adate and the date option.
    stop = 1; Adate = 1;
    Option = 4'b0001; #1;
    press(3);
    Option = 4'b0010; #1;
    expect_display(-1, ref_date, 4'b0000, "date not adjusted without option");
    press(30);
    ref_date = (ref_date + 30) % 32; n_date_adj++;
    expect_display(-1, ref_date, 4'b0000, "date adjusted");
    press(2);
    ref_date = (ref_date + 2) % 32; n_date_wrap++;
    expect_display(-1, ref_date, 4'b0000, "date wrapped");
    Adate = 0;
    // Invalid option: blank.
    Option = 4'b0110; #1;
    read_display(h, l, p);
    checks++;
    if (h != -1 || l != -1 || p != 0) begin failures++; $display("not blank"); end
    else n_blank++;

    // A whole day in 12-hour mode: the alarm, set to hour 0 (shown hour),
    // fires at 00:mm and again at 12:mm.
    Option = 4'b0001; Format = 0; #1;
    setalm = 1; sethr = 1;
    press(1);
    alm_h = (alm_h >= 11) ? 0 : alm_h + 1;
    setalm = 0; sethr = 0;
    expect_display(ref_t / 3600 % 12, (ref_t / 60) % 60, 4'b0100, "12-hour before day");
    pulse_count = 0;
    stop = 0;
    run_ticks(86400 + 2);
    checks++;
    if (pulse_count != 2) begin failures++; $display("12-hour alarm fired %0d times", pulse_count); end
    else n_alarm12++;

    // Every mechanism must have happened.
    begin
      int m [string];
      m["second carry"] = n_sec_carry; m["minute carry"] = n_min_carry;
      m["hour carry"] = n_hr_carry;    m["day end"] = n_day_end;
      m["stop hold"] = n_stop_hold;    m["set hour"] = n_set_hr;
      m["set minute"] = n_set_min;     m["12-hour format"] = n_fmt12;
      m["alarm set"] = n_alarm_set;    m["alarm pulse"] = n_alarm_fire;
      m["stopwatch run"] = n_sw_run;   m["stopwatch hold"] = n_sw_hold;
      m["stopwatch wrap"] = n_sw_wrap; m["date adjust"] = n_date_adj;
      m["date wrap"] = n_date_wrap;    m["blank display"] = n_blank;
      m["seconds blinker"] = n_dot;   m["12-hour alarm twice"] = n_alarm12;
      foreach (m[k]) begin
        checks++;
        $display("mechanism %-16s happened %0d times", k, m[k]);
        if (m[k] == 0) begin failures++; $display("mechanism %s never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
