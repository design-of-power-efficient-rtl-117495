// launch_ff -- Flip-flop 1, the launching register of the stage.
//
// A rising-edge D flip-flop clocked by the gated clock.  Its output drives
// the combinational path whose late transitions the capturing flip-flop
// (capture_msff) tolerates.  The design names this flip-flop and its place;
// the asynchronous active-low reset is a choice of this implementation so
// that the stage starts from a known state.
//
// Interface: clk (gated clock), rst_n (asynchronous reset, active low),
// d (data), q (data launched into the combinational path).
// Timing: q takes d at each rising edge of clk.
`timescale 1ns / 1ps
module launch_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
