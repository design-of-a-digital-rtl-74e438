// digital_clock: a clock with time, alarm, stopwatch and date on a 4-digit
// seven-segment display, for a 50 MHz FPGA board.
//
// Structure: clock_divider makes a one-cycle 1 Hz tick from `systemclock`;
// clock_time counts hh:mm:ss and can be set; alarm compares a settable alarm
// time with the displayed time and raises `alarmout`; stopwatch counts mm:ss
// for up to an hour; date_counter counts days 0..31. display_select decodes
// the variable chosen by Option(3:0) into four digit patterns and scan4digit
// multiplexes them onto the display (An(3:0) anodes, ca..cg segments, dp,
// all active low). The clock seconds are shown in binary on the six LEDs
// `sec(5:0)` at all times. The increment button `inct` goes through
// button_pulse so each press is one increment.
//
// Switches (all active high): stop halts the time; stop+settime with sethr or
// setmin lets inct step the hours or minutes; setalm with sethr or setmin
// lets inct step the alarm; Adate with stop and the date option lets inct step
// the date; strtstop runs the stopwatch; Format selects 24-hour (1) or
// 12-hour (0) display. `reset` is a synchronous, active-high reset of
// everything.
//
// The port names are those of the design's top-level symbol. Which meaning
// the two point outputs carry is this design's choice: `dp` is the
// multiplexed decimal point (lit on digit 2 as a separator), and `dot` is a
// seconds blinker that toggles on every 1 Hz tick while the clock runs.
// Everything runs on `systemclock`, with the 1 Hz tick as an enable.
module digital_clock
  import clock_pkg::*;
#(
  parameter int unsigned DIVISOR      = 50_000_000,
  parameter int unsigned REFRESH_BITS = 16
) (
  input  logic       systemclock,
  input  logic       reset,
  input  logic [3:0] Option,
  input  logic       Adate,
  input  logic       Format,
  input  logic       inct,
  input  logic       setalm,
  input  logic       sethr,
  input  logic       setmin,
  input  logic       settime,
  input  logic       stop,
  input  logic       strtstop,
  output logic [3:0] An,
  output logic [5:0] sec,
  output logic       alarmout,
  output logic       ca,
  output logic       cb,
  output logic       cc,
  output logic       cd,
  output logic       ce,
  output logic       cf,
  output logic       cg,
  output logic       dot,
  output logic       dp
);
  logic       tick, inc, day_end;
  val6_t      hour, hour24, minute, second, date;
  val6_t      alm_hour, alm_minute, sw_minute, sw_second;
  seg_t [3:0] digits;
  logic [3:0] dp_en;
  seg_t       seg;

  clock_divider #(.DIVISOR(DIVISOR)) u_div (
    .clk(systemclock), .rst(reset), .tick(tick));

  button_pulse u_inct (
    .clk(systemclock), .rst(reset), .btn(inct), .pulse(inc));

  clock_time u_clock (
    .clk(systemclock), .rst(reset), .tick(tick), .stop(stop),
    .settime(settime), .sethr(sethr), .setmin(setmin), .inc(inc),
    .fmt24(Format), .hour(hour), .hour24(hour24), .minute(minute),
    .second(second), .day_end(day_end));

  alarm u_alarm (
    .clk(systemclock), .rst(reset), .setalm(setalm), .sethr(sethr),
    .setmin(setmin), .inc(inc), .fmt24(Format), .hour(hour),
    .minute(minute), .second(second), .alm_hour(alm_hour),
    .alm_minute(alm_minute), .alarmout(alarmout));

  stopwatch u_stopwatch (
    .clk(systemclock), .rst(reset), .tick(tick), .strtstop(strtstop),
    .sw_minute(sw_minute), .sw_second(sw_second));

  date_counter u_date (
    .clk(systemclock), .rst(reset), .day_end(day_end), .adate(Adate),
    .stop(stop), .date_shown(Option[OPT_DATE]), .inc(inc), .date(date));

  display_select u_select (
    .option(Option), .hour(hour), .minute(minute), .date(date),
    .alm_hour(alm_hour), .alm_minute(alm_minute), .sw_minute(sw_minute),
    .sw_second(sw_second), .digits(digits), .dp_en(dp_en));

  scan4digit #(.REFRESH_BITS(REFRESH_BITS)) u_scan (
    .clk(systemclock), .rst(reset), .digits(digits), .dp_en(dp_en),
    .an(An), .seg(seg), .dp(dp));

  assign {cg, cf, ce, cd, cc, cb, ca} = seg;
  assign sec = second;

  always_ff @(posedge systemclock) begin
    if (reset)              dot <= 1'b0;
    else if (tick && !stop) dot <= !dot;
  end

  // hour24 is only needed inside clock_time; it is kept as a port there for
  // observation and is unused here.
  logic unused_ok;
  assign unused_ok = ^hour24;
endmodule
