// tb_date_counter: day-end stepping with the 31-to-0 wrap, and manual
// adjustment for every combination of its three enabling switches.
module tb_date_counter;
  logic clk = 0, rst = 1, day_end = 0, adate = 0, stop = 0, date_shown = 0, inc = 0;
  logic [5:0] date;
  int checks = 0, failures = 0, ref_d = 0;

  date_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_date(input string what);
    checks++;
    if (date != 6'(ref_d)) begin
      failures++; $display("%s: date %0d expected %0d", what, date, ref_d);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    expect_date("reset");
    for (int k = 0; k < 35; k++) begin
      day_end <= 1; @(posedge clk); day_end <= 0; #1;
      ref_d = (ref_d + 1) % 32;
      expect_date("day end");
      @(posedge clk); #1;
    end
    for (int c = 0; c < 8; c++) begin
      {adate, stop, date_shown} = 3'(c);
      for (int k = 0; k < 33; k++) begin
        inc <= 1; @(posedge clk); inc <= 0; #1;
        if (c == 7) ref_d = (ref_d + 1) % 32;
        expect_date("inc");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
