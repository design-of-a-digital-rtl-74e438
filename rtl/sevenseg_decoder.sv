// sevenseg_decoder: a six-bit value as two common-anode seven-segment digits.
//
// The value (0..63) is split into a tens digit (0..6) and a units digit
// (0..9), and each digit is turned into the active-low segment pattern of a
// common-anode display (clock_pkg::digit_to_seg, bit 0 = segment a). Every
// displayed quantity of the clock (hours, minutes, date, stopwatch minutes
// and seconds) passes through one of these. Splitting the binary value into
// decimal digits by a divide-by-ten is this design's way of doing it.
//
// Purely combinational.
module sevenseg_decoder
  import clock_pkg::*;
(
  input  val6_t value,
  output seg_t  tens,
  output seg_t  units
);
  logic [3:0] t, u;
  always_comb begin
    t = 4'(value / 6'd10);
    u = 4'(value % 6'd10);
  end
  assign tens  = digit_to_seg(t);
  assign units = digit_to_seg(u);
endmodule
