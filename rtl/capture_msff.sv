// capture_msff -- Flip-flop 2, the timing-error-tolerant capturing register.
//
// A master-slave flip-flop built from two level-sensitive latches whose
// clocks are separate inputs:
//   * the master latch is transparent while cm is high.  cm comes from
//     master_clock_gen: high during the low clock phase, and high again
//     whenever a late data transition has been detected;
//   * the slave latch is transparent while clk (the gated clock) is high.
// With cm = not clk this is an ordinary rising-edge flip-flop.  When data
// arrives after the rising edge, Er reopens the master while the slave is
// still transparent, so the late value flows to q within the high phase:
// the timing error is corrected in place, without stalling or replaying
// the system clock (the next stage borrows the time taken).
//
// The two-latch structure with a separate master clock follows the design;
// the asynchronous active-low reset of both latches is this implementation's
// choice.  The two latches are intended: the tools' latch warnings on m and
// q describe the circuit as designed.
//
// Interface: rst_n (asynchronous reset, active low), cm (master clock),
// clk (slave clock), d (data from the combinational path, In), q (output).
// Timing: q follows d through both latches while cm and clk are both high.
`timescale 1ns / 1ps
module capture_msff (
  input  logic rst_n,
  input  logic cm,
  input  logic clk,
  input  logic d,
  output logic q
);

  logic m;  // master latch

  always_latch begin
    if (!rst_n)  m = 1'b0;
    else if (cm) m = d;
  end

  always_latch begin
    if (!rst_n)   q = 1'b0;
    else if (clk) q = m;
  end

endmodule
