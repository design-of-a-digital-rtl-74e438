// stopwatch: a minutes:seconds stopwatch that runs for up to 60 minutes.
//
// While `strtstop` is high the seconds advance on every 1 Hz tick; they wrap
// from 59 to 0 and carry into the minutes. After 59:59 the next tick returns
// the stopwatch to 00:00, so it covers one hour. With `strtstop` low the count
// is held, and switching it high again resumes from the held value. Only the
// global reset (synchronous, active high) clears it; having no separate clear
// input is this design's reading, since none is described.
//
// Timing: outputs are registers that change at the clock edge after a tick.
module stopwatch
  import clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,
  input  logic  strtstop,
  output val6_t sw_minute,
  output val6_t sw_second
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sw_minute <= '0;
      sw_second <= '0;
    end else if (strtstop && tick) begin
      if (sw_second == SEC_MAX) begin
        sw_second <= '0;
        sw_minute <= (sw_minute == MIN_MAX) ? '0 : sw_minute + 1'b1;
      end else begin
        sw_second <= sw_second + 1'b1;
      end
    end
  end
endmodule
