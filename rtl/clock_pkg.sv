// clock_pkg: types and constants shared by the digital clock.
//
// The clock keeps every displayed quantity (hours, minutes, seconds, date,
// stopwatch minutes and seconds) as a six-bit binary value, the width the
// display decoders take. Seven-segment patterns are for a common-anode display,
// so a segment is lit by a 0. A pattern is packed {g,f,e,d,c,b,a}: bit 0 is
// segment a. The option switch numbering (bit 0 time, bit 1 date, bit 2 alarm,
// bit 3 stopwatch) follows the order in which the four displayable variables
// are listed for the option switches; the bit assignment itself is a choice of
// this design.
package clock_pkg;

  typedef logic [5:0] val6_t;   // 0..63, one displayed quantity
  typedef logic [6:0] seg_t;    // active-low segments {g,f,e,d,c,b,a}

  // Option(3:0) bit positions
  localparam int unsigned OPT_TIME  = 0;
  localparam int unsigned OPT_DATE  = 1;
  localparam int unsigned OPT_ALARM = 2;
  localparam int unsigned OPT_STOPW = 3;

  localparam seg_t SEG_BLANK = 7'b111_1111;

  // Limits of the counters
  localparam val6_t SEC_MAX  = 6'd59;
  localparam val6_t MIN_MAX  = 6'd59;
  localparam val6_t HR24_MAX = 6'd23;
  localparam val6_t HR12_MAX = 6'd11;
  localparam val6_t DATE_MAX = 6'd31;

  // Digit 0..9 to active-low segment pattern; anything above 9 is blank.
  function automatic seg_t digit_to_seg(input logic [3:0] d);
    unique case (d)
      4'd0:    return 7'b100_0000;
      4'd1:    return 7'b111_1001;
      4'd2:    return 7'b010_0100;
      4'd3:    return 7'b011_0000;
      4'd4:    return 7'b001_1001;
      4'd5:    return 7'b001_0010;
      4'd6:    return 7'b000_0010;
      4'd7:    return 7'b111_1000;
      4'd8:    return 7'b000_0000;
      4'd9:    return 7'b001_0000;
      default: return SEG_BLANK;
    endcase
  endfunction

  // Hour as shown: unchanged in 24-hour mode, 0..11 in 12-hour mode.
  function automatic val6_t hour_display(input val6_t hr24, input logic fmt24);
    if (fmt24 || hr24 < 6'd12) return hr24;
    else                       return hr24 - 6'd12;
  endfunction

endpackage
