// tet_top -- timing-error-tolerant stage with clock gating.
//
// One pipeline stage: Flip-flop 1 launches data into a combinational path;
// the path's output In is captured by Flip-flop 2, a master-slave flip-flop
// whose master latch has its own clock CM.  A transition detector watches
// In and raises Er for a short window after each transition; the master
// clock generator turns Er and the clock into CM, so a transition that
// arrives after the rising edge (a setup-time violation in an ordinary
// flip-flop) reopens the master while the slave is transparent and the late
// value still reaches q in the same cycle.  The system clock is never
// stretched or stopped for an error.  Both flip-flops, the master clock
// generator and the slave latch run from one gated clock: with EN low the
// stage receives no clock edges at all.
//
// The combinational path itself is left outside this module: its output
// path_src goes out, and its result comes back on path_dst (In).  Connect
// the logic (or, in simulation, a delayed model of it) between the two.
//
// The blocks and their connections follow the design.  The clock gate also
// drives the slave clock and the clock input of the master clock generator,
// and the reset and the Er output port are this implementation's choices.
//
// Interface: clk, en (clock and clock enable), rst_n (asynchronous reset,
// active low), d (data into Flip-flop 1), path_src (Flip-flop 1 output, into
// the combinational path), path_dst (combinational path output, In of
// Flip-flop 2), q (Flip-flop 2 output), er (late/any transition on In).
// Timing: one cycle from d to path_src; data on path_dst that settles up to
// half a clock period after a rising edge is still the value q holds for
// that cycle, reaching q as soon as it arrives.
`timescale 1ns / 1ps
module tet_top #(
  parameter real TD_DELAY_NS = 1.0
) (
  input  logic clk,
  input  logic en,
  input  logic rst_n,
  input  logic d,
  output logic path_src,
  input  logic path_dst,
  output logic q,
  output logic er
);

  logic gclk;  // gated clock
  logic cm;    // master clock of Flip-flop 2

  clock_gate u_cg (
    .clk  (clk),
    .en   (en),
    .gclk (gclk)
  );

  launch_ff u_ff1 (
    .clk   (gclk),
    .rst_n (rst_n),
    .d     (d),
    .q     (path_src)
  );

  transition_detector #(
    .DELAY_NS (TD_DELAY_NS)
  ) u_td (
    .in (path_dst),
    .er (er)
  );

  master_clock_gen u_mcg (
    .clk (gclk),
    .er  (er),
    .cm  (cm)
  );

  capture_msff u_ff2 (
    .rst_n (rst_n),
    .cm    (cm),
    .clk   (gclk),
    .d     (path_dst),
    .q     (q)
  );

endmodule
