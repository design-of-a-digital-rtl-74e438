// clock_divider: one-cycle 1 Hz time-base pulse from the board oscillator.
//
// A counter runs from 0 to DIVISOR-1 on every board clock edge; in the cycle
// where it holds DIVISOR-1 the output `tick` is high for exactly one cycle and
// the counter returns to 0. With the default DIVISOR of 50,000,000 a 50 MHz
// oscillator gives one tick per second, the count the design is built around.
// The tick is used as a clock enable by the rest of the design instead of as
// a derived clock, so the whole clock runs in one clock domain (this is a
// choice of this design). Reset is synchronous and active high.
//
// Timing: the first tick comes DIVISOR cycles after reset is released, then
// one every DIVISOR cycles.
module clock_divider #(
  parameter int unsigned DIVISOR = 50_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIVISOR - 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == LAST) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

  initial assert (DIVISOR >= 2) else $error("DIVISOR must be at least 2");
endmodule
