// tb_stopwatch: runs the stopwatch past the one-hour wrap with the start/stop
// switch toggled at random, against a counted reference.
module tb_stopwatch;
  logic clk = 0, rst = 1, tick = 0, strtstop = 0;
  logic [5:0] sw_minute, sw_second;
  int checks = 0, failures = 0;
  int ref_s = 0, wraps = 0, held = 0;

  stopwatch dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int i = 0; i < 4000; i++) begin
      strtstop = ($urandom_range(0, 19) != 0);
      tick <= 1; @(posedge clk); tick <= 0; #1;
      if (strtstop) begin
        ref_s = ref_s + 1;
        if (ref_s == 3600) begin ref_s = 0; wraps++; end
      end else held++;
      checks++;
      if (sw_minute != 6'(ref_s / 60) || sw_second != 6'(ref_s % 60)) begin
        failures++;
        $display("step %0d: %0d:%0d expected %0d:%0d", i, sw_minute, sw_second,
                 ref_s / 60, ref_s % 60);
      end
      // Without a tick nothing moves.
      @(posedge clk); #1;
      checks++;
      if (sw_minute != 6'(ref_s / 60) || sw_second != 6'(ref_s % 60)) begin
        failures++; $display("moved without tick");
      end
    end
    checks++;
    if (wraps == 0 || held == 0) begin failures++; $display("wrap or hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
