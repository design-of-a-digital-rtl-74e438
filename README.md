# Digital clock with alarm, stopwatch and date for a 50 MHz FPGA board

This is a digital clock for a small FPGA board that has a 50 MHz oscillator,
a four-digit common-anode seven-segment display, six LEDs, slide switches and
one push button. One 1 Hz time base drives four counters:

- a time of day, `hh:mm:ss`, shown in 24-hour or 12-hour form;
- an alarm time, `hh:mm`, with an output pulse when the clock reaches it;
- a stopwatch, `mm:ss`, that runs for up to one hour;
- a day number from 0 to 31.

The four digits show one of these at a time, picked by four option switches.
The clock's seconds are always shown in binary on the six LEDs. All setting is
done with switches and one increment button (`inct`). No value is ever typed
in; a value is stepped up one press at a time.

The structure follows a published VHDL design for a Spartan-3 starter board:
a divider, a clock, an alarm, a stopwatch, a date counter, one pair of
seven-segment decoders for each displayed value, and a four-digit scanner. The
top-level pin names are that design's own. The behaviour in this RTL follows
its description. Where the description says nothing (encodings, pulse lengths,
refresh rate, reset), this RTL makes its own choices. They are listed in
[Departures and choices](#departures-and-choices).

## Pins

| pin | dir | meaning |
|---|---|---|
| `systemclock` | in | 50 MHz board clock; the only clock |
| `reset` | in | synchronous, active high; clears every counter and the alarm to 0 |
| `Option[3:0]` | in | what the display shows: bit 0 time, bit 1 date, bit 2 alarm, bit 3 stopwatch |
| `Format` | in | 1 = 24-hour display, 0 = 12-hour display (hours 0..11) |
| `stop` | in | halts the time of day |
| `settime` | in | with `stop`: lets `inct` set the time |
| `setalm` | in | lets `inct` set the alarm |
| `sethr`, `setmin` | in | choose whether `inct` steps the hours or the minutes (both: both step) |
| `Adate` | in | with `stop` and `Option[1]`: lets `inct` step the date |
| `inct` | in | increment push button; one press is one step |
| `strtstop` | in | stopwatch runs while high and holds while low |
| `An[3:0]` | out | digit anodes, active low; `An[3]` is the leftmost digit |
| `ca`..`cg` | out | segments a..g, active low, shared by all four digits |
| `dp` | out | decimal point, active low, shared |
| `sec[5:0]` | out | clock seconds in binary |
| `alarmout` | out | high for the one second `hh:mm:00` at which the time reaches the alarm |
| `dot` | out | toggles on every second while the clock runs (a blinker) |

Of the 35 pins, 15 are inputs and 20 are outputs. This matches the I/O count
reported for the original FPGA build.

## Using it

**Setting the time.** Raise `stop`, then `settime`. Raise `sethr` and press
`inct` to step the hour: it goes 0, 1, ..., 23, 0. Or raise `setmin` to step
the minute: 0..59, 0. Setting leaves the seconds alone. Lower `settime` and
`stop` and the clock runs on from the value you set.

**12-hour display.** With `Format` low the hour is shown as 0..11. There is no
AM/PM indication. Internally the clock always counts 0..23. `Format` changes
only how the hour is shown and compared with the alarm, so a day still lasts
24 hours.

**Alarm.** Raise `setalm` and step the alarm hour and minute with `sethr`,
`setmin` and `inct`. `stop` is not needed. The alarm is compared with the
hour *as shown*. Set it in the format you use: in 12-hour mode the alarm hour
wraps after 11, and the alarm fires twice a day. While `setalm` is high the
alarm output is held low. There is no alarm-enable switch. After reset the
alarm is 00:00, so it fires at midnight until it is set to another time.

**Stopwatch.** `strtstop` high runs it and low holds it. After 59:59 it goes
back to 00:00. Only `reset` clears it.

**Date.** The date advances when the time steps from 23:59:59 to 00:00:00.
After 31 it goes back to 0; there are no month lengths. To adjust it, raise
`stop`, select the date display (`Option = 0010`), raise `Adate`, and press
`inct`.

**Display.** Exactly one option bit must be high. Any other setting blanks the
display.

| Option | digits 3-2 | digits 1-0 | decimal point |
|---|---|---|---|
| `0001` time | hours | minutes | after digit 2 |
| `0010` date | blank | date | none |
| `0100` alarm | alarm hours | alarm minutes | after digit 2 |
| `1000` stopwatch | minutes | seconds | after digit 2 |

## How the time base and the counters interact

`clock_divider` counts board cycles from 0 to `DIVISOR-1`. At the wrap it
raises `tick` for exactly one cycle, so the default `DIVISOR = 50_000_000`
gives one tick per second. The tick is not used as a clock. It is a **clock
enable**.
Every register runs on `systemclock`, and there is one clock domain.

On a tick, `clock_time` advances the seconds. When the seconds wrap, it
advances the minutes, and when the minutes wrap, the hours. The tick that
takes the time from 23:59:59 to 00:00:00 also raises `day_end` for one cycle,
and `date_counter` counts that. The stopwatch uses the same tick, so it is in
step with the clock.

The button goes through `button_pulse`. It is a two-flop synchroniser plus a
rising-edge detector, so each press gives exactly one one-cycle `inc` pulse,
however long the button is held. The pulse goes to the clock, the alarm and
the date. Each of these uses it only when its own set switches are on. There
is no debouncer: a bouncy button can step several times. On real hardware,
add one ahead of `button_pulse` if the button needs it.

The time counter ignores `inc` unless `stop` is high, and it ignores ticks
while `stop` is high. So running and setting never happen in the same cycle.

## The display path

The display path is where most of the logic is:

1. `display_select` holds seven `sevenseg_decoder`s, one per displayed value:
   clock hour, clock minute, date, alarm hour, alarm minute, stopwatch minute
   and stopwatch second. Each decoder splits its 6-bit value into decimal tens
   and units (by `/10` and `%10`). It turns each digit into an active-low
   pattern, with bit 0 = segment a. The patterns are in `clock_pkg::digit_to_seg`.
2. `display_select` then uses `Option` to pick four of these patterns and the
   decimal-point mask.
3. `scan4digit` has a free-running counter of `REFRESH_BITS+2` bits. Its top
   two bits select the digit, which is enabled for `2**REFRESH_BITS` cycles:
   1.31 ms at 50 MHz with the default 16. All four digits are refreshed at
   about 190 Hz. The anode, segment and dp outputs are registered. Only one
   anode is enabled at a time, and an assertion checks this.

## Files

All RTL is in `rtl/`, one unit per file. `clock_pkg.sv` holds the shared
types (`val6_t`, `seg_t`), the limits, the option bit positions, the digit
table, and the 12-hour folding function. The other files are
`clock_divider`, `button_pulse`, `clock_time`, `alarm`, `stopwatch`,
`date_counter`, `sevenseg_decoder`, `display_select` and `scan4digit`. The top
is `digital_clock`.

| parameter | default | where | meaning |
|---|---|---|---|
| `DIVISOR` | 50,000,000 | `digital_clock`, `clock_divider` | board cycles per second (the original value) |
| `REFRESH_BITS` | 16 | `digital_clock`, `scan4digit` | log2 of the cycles each digit stays lit (chosen here) |

With yosys, the top synthesises to about 111 flip-flop bits. There are no
latches. The digit tables come out as small ROMs.

## Departures and choices

These follow the original description:

- the 50,000,000-cycle divider;
- all counter ranges and wraps: seconds and minutes 0..59, hours 0..23, 12-hour
  display 0..11, stopwatch 59:59 to 00:00, date 0..31;
- the switch sequences for setting the time, the alarm and the date;
- the binary seconds LEDs;
- separate decoders per displayed value, with the mode switching in the top
  level;
- common-anode segments;
- the pin names.

These are choices made here, where the description is silent:

- The 1 Hz pulse is a clock enable, not a derived clock. The original build
  used latches and several global clock buffers; this RTL has none.
- Reset is synchronous and active high.
- One `inct` press gives one step, through a synchroniser and an edge
  detector. There is no debounce.
- The option bit order is time, date, alarm, stopwatch. An option setting that
  is not one-hot blanks the display.
- Digit placement: hours on the left and minutes on the right. For the
  stopwatch, minutes are on the left and seconds on the right. The description
  says the "first two" digits show the stopwatch seconds; here they are read as
  the two rightmost. The date is on the right, with the left pair blank.
- `alarmout` is a pulse one second long. It is held low while the alarm is
  being set, and there is no enable switch.
- The alarm is compared with the displayed hour. This follows the instruction
  to set the alarm in the format in use.
- `dp` is the separator between the digit pairs. `dot` is a one-second
  blinker. The original names both pins but does not say what they do.
- The refresh period of the display scan is chosen here.
- The switches other than `inct` are not synchronised. They are slide switches
  and change rarely.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_seg_pkg.sv` holds an independent
segment table that the display tests use to read digits back. For example,
for the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/clock_pkg.sv tb/tb_seg_pkg.sv tb/tb_digital_clock.sv \
  --top-module tb_digital_clock -o sim && ./obj_dir/sim
```

The two packages are named first. Verilator finds every module in `rtl/` and
`tb/` through `-y`, by its file name.

- `tb_clock_divider`, `tb_clock_time`, `tb_alarm`, `tb_stopwatch`,
  `tb_date_counter`, `tb_sevenseg_decoder`, `tb_display_select` and
  `tb_scan4digit` test one block each, against reference models written in
  the testbench. `tb_clock_time` runs more than a full day of ticks.
- `tb_digital_clock` runs the whole clock with `DIVISOR = 64` and
  `REFRESH_BITS = 1`. A cycle-counting model predicts every tick. The
  testbench checks `sec` and `alarmout` on every cycle and reads the scanned
  display back. It goes through these steps:
  - run, stop, and set the time to 23:58;
  - check the 12-hour display;
  - set the alarm to 23:59 and catch the one-second alarm pulse;
  - pass midnight, so the date advances;
  - hold the stopwatch and run it through its one-hour wrap;
  - adjust the date through its 31-to-0 wrap;
  - check the blank display;
  - run a whole day in 12-hour mode and check that the alarm fires twice.

  It counts how often each of these mechanisms happened and fails if any
  never did.
- `tb_digital_clock_full` runs the top with default parameters (50 MHz,
  `REFRESH_BITS = 16`) for three seconds of board time. That is 150 million
  cycles, about a minute of simulation. It checks that `sec` steps exactly once
  every 50,000,000 cycles and reads the time and stopwatch off the real-rate
  display scan.

The simulator used has two states only, so every register that is read is
reset.

## How far it has been checked

The design has been checked in simulation only, with the testbenches above.
All of them pass. Each block's testbench also fails when a deliberate bug is
put into that block. The RTL has not been run on a board. Before using it on
hardware, look at three things that simulation does not cover: button bounce
on `inct`, the pin polarities of your own display, and metastability on the
slide switches.
