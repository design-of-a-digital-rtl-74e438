// display_select: what the four-digit display shows, chosen by Option(3:0).
//
// Each displayable variable has its own pair of decoders (sevenseg_decoder):
//   Option(0) time      hours on digits 3..2, minutes on digits 1..0
//   Option(1) date      date on digits 1..0, digits 3..2 blank
//   Option(2) alarm     alarm hours on digits 3..2, alarm minutes on 1..0
//   Option(3) stopwatch minutes on digits 3..2, seconds on digits 1..0
// Digit 3 is the leftmost (anode An(3)). Exactly one option switch is meant
// to be high; when none or more than one is, the display is blank. The
// decimal point of digit 2 is lit (dp_en(2) high) as a separator between the
// two pairs whenever a two-pair variable is shown. The option bit order, the
// placement of each pair, the blank display and the separator are choices of
// this design.
//
// Purely combinational.
module display_select
  import clock_pkg::*;
(
  input  logic [3:0] option,
  input  val6_t      hour,
  input  val6_t      minute,
  input  val6_t      date,
  input  val6_t      alm_hour,
  input  val6_t      alm_minute,
  input  val6_t      sw_minute,
  input  val6_t      sw_second,
  output seg_t [3:0] digits,
  output logic [3:0] dp_en
);
  seg_t th_t, th_u, tm_t, tm_u, d_t, d_u, ah_t, ah_u, am_t, am_u;
  seg_t sm_t, sm_u, ss_t, ss_u;

  sevenseg_decoder u_dec_hour (.value(hour),       .tens(th_t), .units(th_u));
  sevenseg_decoder u_dec_min  (.value(minute),     .tens(tm_t), .units(tm_u));
  sevenseg_decoder u_dec_date (.value(date),       .tens(d_t),  .units(d_u));
  sevenseg_decoder u_dec_ahr  (.value(alm_hour),   .tens(ah_t), .units(ah_u));
  sevenseg_decoder u_dec_amin (.value(alm_minute), .tens(am_t), .units(am_u));
  sevenseg_decoder u_dec_swm  (.value(sw_minute),  .tens(sm_t), .units(sm_u));
  sevenseg_decoder u_dec_sws  (.value(sw_second),  .tens(ss_t), .units(ss_u));

  always_comb begin
    digits = {SEG_BLANK, SEG_BLANK, SEG_BLANK, SEG_BLANK};
    dp_en  = 4'b0000;
    unique case (option)
      4'(1 << OPT_TIME):  begin digits = {th_t, th_u, tm_t, tm_u};           dp_en = 4'b0100; end
      4'(1 << OPT_DATE):  begin digits = {SEG_BLANK, SEG_BLANK, d_t, d_u}; end
      4'(1 << OPT_ALARM): begin digits = {ah_t, ah_u, am_t, am_u};           dp_en = 4'b0100; end
      4'(1 << OPT_STOPW): begin digits = {sm_t, sm_u, ss_t, ss_u};           dp_en = 4'b0100; end
      default:            ;
    endcase
  end
endmodule
