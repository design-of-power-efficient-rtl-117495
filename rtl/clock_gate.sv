// clock_gate -- clock gating cell at the root of the error-tolerant stage.
//
// The system clock reaches the stage's flip-flops only while the clock
// enable is high; with the enable low the gated clock stays low, so no
// flip-flop of the stage toggles and no clock power is spent in it.  This
// is the gating function of the design: clock passes when enable is high,
// clock is removed when the stage is not in use.
//
// The cell is the plain combination of enable and clock that the design
// shows, with no enable latch.  It is therefore glitch free only if the
// enable changes while the clock is low; that rule is a choice of this
// design (a user who cannot guarantee it needs a latch-based cell) and is
// checked by the assertion below in simulation.
//
// Interface: clk (system clock), en (clock enable), gclk (gated clock).
// Timing: purely combinational, gclk follows clk with no cycle of delay.
`timescale 1ns / 1ps
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  assign gclk = clk & en;

  // The enable may change only while the clock is low.
  always @(en) begin
    assert (clk == 1'b0)
      else $error("clock_gate: enable changed while the clock was high");
  end

endmodule
