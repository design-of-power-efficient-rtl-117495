// transition_detector -- behavioural model of the transition detector.
//
// Behavioural model (not synthesizable logic): its function rests on the
// propagation delay of a chain of delay buffers, which RTL cannot express.
// The data input In is compared with a copy of itself delayed by the buffer
// chain; while the two differ, that is, for DELAY_NS after every rising or
// falling transition of In, the error output Er is high.  In the design the
// comparison is made by a small gate network behind the buffers; this model
// gives its function, high while In and the delayed In disagree.  The delay
// of the chain is not specified by the design; DELAY_NS = 1.0 is this
// implementation's choice and sets how long the master latch of Flip-flop 2
// is reopened after a late transition.
//
// Interface: in (data input of Flip-flop 2), er (transition pulse).
// Timing: er rises with each transition of in and falls DELAY_NS later
// (transport delay, so pulses of closely spaced transitions are kept apart).
`timescale 1ns / 1ps
module transition_detector #(
  parameter real DELAY_NS = 1.0
) (
  input  logic in,
  output logic er
);

  logic in_dly;  // In after the delay-buffer chain

  initial in_dly = 1'b0;

  // Each transition of In reaches in_dly after DELAY_NS (transport delay).
  always begin
    @(in);
    fork
      automatic logic v = in;
      begin
        #(DELAY_NS) in_dly = v;
      end
    join_none
  end

  assign er = in ^ in_dly;

endmodule
