// scan4digit: drives a four-digit, common-anode multiplexed display.
//
// The four digits share one set of segment lines (ca..cg and the decimal
// point); only one digit's anode is enabled at a time. A free-running counter
// selects the digit: each digit is on for 2**REFRESH_BITS clock cycles, in
// the order 0, 1, 2, 3, so the whole display is refreshed every
// 4 * 2**REFRESH_BITS cycles (about 190 Hz at 50 MHz with the default 16,
// a value chosen by this design). While digit k is selected, an(k) is 0 and
// the other anodes are 1 (active low), `seg` carries digits[k] and `dp` is 0
// (lit) when dp_en[k] is high.
//
// Timing: outputs are registered; they change one cycle after the counter
// moves to a new digit. Reset (synchronous, active high) starts at digit 0.
module scan4digit
  import clock_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  seg_t [3:0] digits,
  input  logic [3:0] dp_en,
  output logic [3:0] an,    // active low
  output seg_t       seg,   // active low {g,f,e,d,c,b,a}
  output logic       dp     // active low
);
  logic [REFRESH_BITS+1:0] count;
  logic [1:0]              sel;

  assign sel = count[REFRESH_BITS+1 -: 2];

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      an    <= 4'b1111;
      seg   <= SEG_BLANK;
      dp    <= 1'b1;
    end else begin
      count <= count + 1'b1;
      an    <= ~(4'b0001 << sel);
      seg   <= digits[sel];
      dp    <= ~dp_en[sel];
    end
  end

  // Never more than one anode enabled.
  always_ff @(posedge clk)
    if (!rst) assert ($countones(~an) <= 1) else $error("two anodes enabled");
endmodule
