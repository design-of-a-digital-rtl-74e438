// tb_clock_divider: tick spacing and width with a small divisor, and the
// first tick after reset.
module tb_clock_divider;
  localparam int DIV = 7;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, nticks = 0;

  clock_divider #(.DIVISOR(DIV)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (DIV * 20) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick) begin
        nticks++;
        checks++;
        if (cyc - last != DIV) begin
          failures++;
          $display("tick at cycle %0d, previous at %0d, expected spacing %0d", cyc, last, DIV);
        end
        last = cyc;
      end
    end
    checks++;
    if (nticks != 20) begin
      failures++;
      $display("saw %0d ticks, expected 20", nticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
