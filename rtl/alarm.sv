// alarm: settable alarm time and the alarm output.
//
// The alarm holds an hour and a minute. While `setalm` is high, each `inc`
// pulse adds one to the alarm hour if `sethr` is high and to the alarm minute
// if `setmin` is high. The alarm hour is set in the format currently shown:
// it wraps from 23 to 0 when `fmt24` is high and from 11 to 0 when it is low
// (an hour above 11 left over from 24-hour mode wraps to 0 on the next
// press). The alarm is compared with the displayed clock time, so the user
// sets it in whichever format is in use, as the clock's own display does.
//
// `alarmout` is high for the whole second in which the displayed hour and
// minute equal the alarm time and the seconds are 0, that is for one second
// when the clock reaches the alarm time (twice a day in 12-hour mode). It is
// held low while `setalm` is high. The one-second pulse length and the
// suppression during setting are this design's choices.
//
// Timing: `alarmout` is registered, one clock cycle after the time reaches
// hh:mm:00. Reset (synchronous, active high) sets the alarm to 00:00.
module alarm
  import clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  setalm,
  input  logic  sethr,
  input  logic  setmin,
  input  logic  inc,
  input  logic  fmt24,
  input  val6_t hour,     // displayed clock hour
  input  val6_t minute,
  input  val6_t second,
  output val6_t alm_hour,
  output val6_t alm_minute,
  output logic  alarmout
);
  val6_t hr_max;
  assign hr_max = fmt24 ? HR24_MAX : HR12_MAX;

  always_ff @(posedge clk) begin
    if (rst) begin
      alm_hour   <= '0;
      alm_minute <= '0;
      alarmout   <= 1'b0;
    end else begin
      if (setalm && inc) begin
        if (sethr)  alm_hour   <= (alm_hour >= hr_max)    ? '0 : alm_hour + 1'b1;
        if (setmin) alm_minute <= (alm_minute == MIN_MAX) ? '0 : alm_minute + 1'b1;
      end
      alarmout <= !setalm && (hour == alm_hour) && (minute == alm_minute)
                  && (second == '0);
    end
  end
endmodule
