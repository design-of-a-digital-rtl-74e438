// button_pulse: turns the increment push button into one-cycle pulses.
//
// The button input is asynchronous to the board clock, so it passes through
// two flip-flops first; a rising edge of the synchronised level then gives a
// `pulse` high for exactly one clock cycle, so one press is one increment
// however long the button is held. There is no debouncing: a bouncing
// contact can give several increments (a choice of this design, kept simple).
//
// Timing: `pulse` is high in the third clock cycle after the input rises.
// Reset (synchronous, active high) clears the synchroniser.
module button_pulse (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic pulse
);
  logic [2:0] sync;

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], btn};
  end

  assign pulse = sync[1] && !sync[2];
endmodule
