// tb_seg_pkg: reference seven-segment encoding for the testbenches.
//
// Built from the list of lit segments of each decimal digit, written out as
// letters, so it does not share code with the design's own table. Patterns
// are active low, bit 0 = segment a, bit 6 = segment g.
package tb_seg_pkg;

  function automatic logic [6:0] ref_seg(input int d);
    string lit;
    logic [6:0] p;
    case (d)
      0: lit = "abcdef";
      1: lit = "bc";
      2: lit = "abdeg";
      3: lit = "abcdg";
      4: lit = "bcfg";
      5: lit = "acdfg";
      6: lit = "acdefg";
      7: lit = "abc";
      8: lit = "abcdefg";
      9: lit = "abcdfg";
      default: lit = "";
    endcase
    p = 7'h7F;
    for (int i = 0; i < lit.len(); i++) p[3'(lit[i] - "a")] = 1'b0;
    return p;
  endfunction

  // Inverse: pattern to digit, -1 for blank, -2 for anything else.
  function automatic int ref_digit(input logic [6:0] p);
    if (p == 7'h7F) return -1;
    for (int d = 0; d < 10; d++) if (ref_seg(d) == p) return d;
    return -2;
  endfunction

endpackage
