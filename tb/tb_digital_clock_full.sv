// tb_digital_clock_full: the clock at its real size (50,000,000-cycle 1 Hz
// divider, 2**16-cycle digit period) for three seconds of board time.
//
// Checks that the seconds LEDs step exactly once per 50,000,000 cycles
// (neither early nor late), that the stopwatch runs alongside, and that the
// scanned display shows the time 00.00 and then the stopwatch 00.03 with the
// separator point lit.
module tb_digital_clock_full;
  import tb_seg_pkg::*;
  localparam int DIV = 50_000_000;
  localparam int RB  = 16;

  logic systemclock = 0, reset = 1;
  logic [3:0] Option = 4'b0001;
  logic Adate = 0, Format = 1, inct = 0, setalm = 0, sethr = 0, setmin = 0;
  logic settime = 0, stop = 0, strtstop = 1;
  logic [3:0] An;
  logic [5:0] sec;
  logic alarmout, ca, cb, cc, cd, ce, cf, cg, dot, dp;
  int checks = 0, failures = 0;

  digital_clock dut (.*);

  always #5 systemclock = ~systemclock;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_display(input int hi, input int lo, input string what);
    logic [3:0][6:0] d;
    logic [3:0] dps;
    d = '0; dps = '0;
    repeat (4 * (1 << RB) + 2) begin
      @(posedge systemclock); #1;
      for (int k = 0; k < 4; k++) if (An == ~(4'b1 << k)) begin
        d[k] = {cg, cf, ce, cd, cc, cb, ca};
        dps[k] = !dp;
      end
    end
    checks++;
    if (d[3] != ref_seg(hi / 10) || d[2] != ref_seg(hi % 10) ||
        d[1] != ref_seg(lo / 10) || d[0] != ref_seg(lo % 10) || dps != 4'b0100) begin
      failures++;
      $display("%s: display %0d%0d.%0d%0d expected %0d.%0d", what, ref_digit(d[3]),
               ref_digit(d[2]), ref_digit(d[1]), ref_digit(d[0]), hi, lo);
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge systemclock);
    #1 reset = 0;
    expect_display(0, 0, "time after reset");
    cyc = 4 * (1 << RB) + 2;
    for (int s = 1; s <= 3; s++) begin
      // The seconds change at the edge s*DIV+1 after reset is released.
      repeat (s * DIV - cyc) @(posedge systemclock);
      cyc = s * DIV;
      #1;
      checks++;
      if (sec != 6'(s - 1)) begin failures++; $display("sec %0d early at cycle %0d", sec, cyc); end
      @(posedge systemclock); cyc++; #1;
      checks++;
      if (sec != 6'(s)) begin failures++; $display("sec %0d, expected %0d at cycle %0d", sec, s, cyc); end
    end
    Option = 4'b1000;
    expect_display(0, 3, "stopwatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
