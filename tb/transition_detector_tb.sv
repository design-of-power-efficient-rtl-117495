// transition_detector_tb -- self-checking testbench for transition_detector.
//
// Toggles the input at random intervals longer than the detector delay and
// checks that Er is high shortly after each transition, still high just
// before the delay has passed, and low again shortly after it.  Also checks
// that a steady input gives no pulse and that the number of Er pulses equals
// the number of input transitions.
`timescale 1ns / 1ps
module transition_detector_tb;

  localparam real D = 1.0;   // detector delay under test, ns

  logic in, er;
  int   checks = 0, failures = 0;
  int   pulses = 0, transitions = 0;

  transition_detector #(.DELAY_NS(D)) dut (.in(in), .er(er));

  always @(posedge er) pulses++;

  task automatic check(input logic exp, input string what);
    checks++;
    if (er !== exp) begin
      failures++;
      $display("FAIL %s at %0t: er=%0b expected %0b", what, $time, er, exp);
    end
  endtask

  initial begin
    in = 1'b0;
    #5 check(1'b0, "steady input");
    for (int i = 0; i < 200; i++) begin
      in = ~in;
      transitions++;
      #0.1  check(1'b1, "just after transition");
      #0.8  check(1'b1, "before the delay has passed");
      #0.2  check(1'b0, "after the delay has passed");
      #($urandom_range(1, 30) * 0.1) check(1'b0, "steady input");
    end
    checks++;
    if (pulses != transitions) begin
      failures++;
      $display("FAIL %0d pulses for %0d transitions", pulses, transitions);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
