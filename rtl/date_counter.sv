// date_counter: the day number, 0..31.
//
// The date advances by one on each `day_end` pulse from the time counter
// (the step from 23:59:59 to 00:00:00) and wraps from 31 to 0. It is adjusted
// by hand with the increment button: an `inc` pulse adds one when `adate`,
// `stop` and `date_shown` (the date option switch) are all high, with the
// same 31-to-0 wrap. The date has no month length; it is a plain 32-state
// counter as described.
//
// Timing: `date` is a register that changes at the clock edge after the
// pulse. Reset (synchronous, active high) sets it to 0.
module date_counter
  import clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  day_end,
  input  logic  adate,
  input  logic  stop,
  input  logic  date_shown,
  input  logic  inc,
  output val6_t date
);
  logic step;
  assign step = day_end || (adate && stop && date_shown && inc);

  always_ff @(posedge clk) begin
    if (rst)       date <= '0;
    else if (step) date <= (date == DATE_MAX) ? '0 : date + 1'b1;
  end
endmodule
