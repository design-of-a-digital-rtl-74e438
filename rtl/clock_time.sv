// clock_time: the time-of-day counter (hours, minutes, seconds).
//
// Seconds count 0..59 on each 1 Hz tick; on the tick that takes them from 59
// back to 0 the minutes advance, and when the minutes wrap from 59 to 0 the
// hours advance, wrapping from 23 to 0. The pulse `day_end` marks the tick
// that takes the time from 23:59:59 to 00:00:00; it drives the date.
//
// Setting: while `stop` is high the time does not advance. With `stop` and
// `settime` both high, each `inc` pulse (one cycle, from the increment
// button) adds one to the hours if `sethr` is high (wrapping 23 to 0) and to
// the minutes if `setmin` is high (wrapping 59 to 0). Setting does not
// produce `day_end`. The seconds are not touched by setting.
//
// Format: the counter always runs in 24-hour form (`hour24`); `hour` is the
// hour as shown, equal to hour24 when `fmt24` is high and to hour24 mod 12
// (0..11) when it is low. Keeping one 24-hour count and folding it for
// display is this design's choice; the day still ends after 24 hours in
// either mode.
//
// Timing: all outputs are registered (or decoded from registers); a tick or
// an inc pulse takes effect at the next clock edge. Reset is synchronous,
// active high, to 00:00:00.
module clock_time
  import clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,     // 1 Hz enable, one cycle
  input  logic  stop,
  input  logic  settime,
  input  logic  sethr,
  input  logic  setmin,
  input  logic  inc,      // increment request, one cycle
  input  logic  fmt24,    // 1: 24-hour display, 0: 12-hour display
  output val6_t hour,     // displayed hour
  output val6_t hour24,
  output val6_t minute,
  output val6_t second,
  output logic  day_end
);
  val6_t hr_q, min_q, sec_q;
  logic  set_en;

  assign set_en = stop && settime && inc;

  always_ff @(posedge clk) begin
    if (rst) begin
      hr_q    <= '0;
      min_q   <= '0;
      sec_q   <= '0;
      day_end <= 1'b0;
    end else begin
      day_end <= 1'b0;
      if (!stop && tick) begin
        if (sec_q == SEC_MAX) begin
          sec_q <= '0;
          if (min_q == MIN_MAX) begin
            min_q <= '0;
            if (hr_q == HR24_MAX) begin
              hr_q    <= '0;
              day_end <= 1'b1;
            end else begin
              hr_q <= hr_q + 1'b1;
            end
          end else begin
            min_q <= min_q + 1'b1;
          end
        end else begin
          sec_q <= sec_q + 1'b1;
        end
      end else if (set_en) begin
        if (sethr)  hr_q  <= (hr_q  == HR24_MAX) ? '0 : hr_q  + 1'b1;
        if (setmin) min_q <= (min_q == MIN_MAX)  ? '0 : min_q + 1'b1;
      end
    end
  end

  assign hour24 = hr_q;
  assign minute = min_q;
  assign second = sec_q;
  assign hour   = hour_display(hr_q, fmt24);

  // The counters never leave their ranges.
  always_ff @(posedge clk)
    if (!rst) assert (hr_q <= HR24_MAX && min_q <= MIN_MAX && sec_q <= SEC_MAX)
      else $error("time counter out of range");
endmodule
