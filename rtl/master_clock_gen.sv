// master_clock_gen -- builds the master-latch clock CM of Flip-flop 2.
//
// In an ordinary master-slave flip-flop the master latch is transparent
// while the clock is low and closes at the rising edge.  Here the master has
// its own clock CM: it is high (master transparent) while the clock is low,
// and also whenever the transition detector raises Er.  A data transition
// that arrives after the rising edge therefore reopens the master's
// transparent window for as long as Er stays high, and because the slave is
// transparent during the high phase the late data reaches the output in the
// same cycle.  The inputs (Er and the inverted clock) and the output CM are
// those of the design; CM = (not clk) or Er is how this implementation reads
// "keeps a transparent window open".
//
// Interface: clk (gated clock), er (transition detector output),
// cm (master clock, high = master latch transparent).
// Timing: purely combinational.
`timescale 1ns / 1ps
module master_clock_gen (
  input  logic clk,
  input  logic er,
  output logic cm
);

  assign cm = ~clk | er;

endmodule
