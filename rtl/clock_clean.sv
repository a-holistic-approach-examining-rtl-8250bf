// Field-clock cleaner.
//
// The core clock is taken from the 125 kHz field sinusoid.  On a weak supply its
// slow rising edge can cross the input threshold more than once, which would
// clock the core several times.  A flip-flop with its data input tied to '1' is
// clocked by the raw field clock: the first rising crossing sets CLEAN_CLOCK and
// any further wiggle of the field clock while its RC-delayed copy DELAYED_CLK is
// still low has no effect.  The output is cleared asynchronously only in the
// window after a falling edge, while FIELD_CLOCK is low and DELAYED_CLK is still
// high, or while nRST is low.  CLEAN_CLOCK therefore rises with the first rising
// crossing of FIELD_CLOCK and falls with its falling edge.
//
// Ports: field_clock (raw), delayed_clk (field clock through the external RC
// delay), nrst (active low), clean_clock (to every flip-flop of the core).
// The flip-flop with D = '1', clocked by the field clock and reset from a
// combination of the field clock, delayed clock and nRST, follows the document;
// the exact clear condition is this design's choice.
`timescale 1ns/1ps
module clock_clean (
  input  logic field_clock,
  input  logic delayed_clk,
  input  logic nrst,
  output logic clean_clock
);

  logic clr;

  assign clr = ~nrst | (~field_clock & delayed_clk);

  always_ff @(posedge field_clock or posedge clr) begin
    if (clr) clean_clock <= 1'b0;
    else     clean_clock <= 1'b1;
  end

endmodule
