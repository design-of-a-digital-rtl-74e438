// tb_scan4digit: with a short refresh period, checks that each digit is
// enabled in turn for 2**REFRESH_BITS cycles with its own segments and
// decimal point, while the digit inputs change at random.
module tb_scan4digit;
  localparam int RB = 2;
  logic clk = 0, rst = 1;
  logic [3:0][6:0] digits;
  logic [3:0] dp_en;
  logic [3:0] an;
  logic [6:0] seg;
  logic dp;
  int checks = 0, failures = 0;
  int seen [4];

  scan4digit #(.REFRESH_BITS(RB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][6:0] d_prev;
    logic [3:0] dp_prev;
    int n;
    digits = '0; dp_en = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // Cycle n after reset shows digit ((n-1) >> RB) % 4, from the inputs
    // present one cycle earlier.
    n = 0;
    for (int i = 0; i < 400; i++) begin
      d_prev = digits; dp_prev = dp_en;
      @(posedge clk); #1;
      if (i % 3 == 0) begin
        digits = {7'($urandom), 7'($urandom), 7'($urandom), 7'($urandom)};
        dp_en  = 4'($urandom);
      end
      n++;
      begin
        int k;
        k = ((n - 1) >> RB) % 4;
        seen[k]++;
        checks++;
        if (an !== ~(4'b1 << k) || seg !== d_prev[k] || dp !== ~dp_prev[k]) begin
          failures++;
          $display("cycle %0d: an %b seg %b dp %b expected digit %0d seg %b dp %b",
                   n, an, seg, dp, k, d_prev[k], ~dp_prev[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
