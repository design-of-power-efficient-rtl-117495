// clock_gate_tb -- self-checking testbench for clock_gate.
//
// Runs the clock for a number of periods, changing the enable at random but
// only while the clock is low.  In the middle of every phase the gated clock
// is compared with the expected value (the clock while enable is high, low
// otherwise), and the rising edges of the gated clock are counted against
// the number of enabled periods.
`timescale 1ns / 1ps
module clock_gate_tb;

  logic clk, en, gclk;
  int   checks = 0, failures = 0;
  int   exp_edges = 0, gclk_edges = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) gclk_edges++;

  task automatic check(input logic exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s at %0t: gclk=%0b expected %0b", what, $time, gclk, exp);
    end
  endtask

  initial begin
    clk = 1'b0;
    en  = 1'b0;
    #1;
    for (int i = 0; i < 200; i++) begin
      en = (i < 4) ? 1'b1 : ($urandom_range(0, 2) != 0);   // mostly enabled
      #2.5 check(1'b0, "low phase");
      #2.5 clk = 1'b1;
      if (en) exp_edges++;
      #2.5 check(en, "high phase");
      #2.5 clk = 1'b0;
    end
    checks++;
    if (gclk_edges != exp_edges) begin
      failures++;
      $display("FAIL edge count: %0d gated edges, expected %0d", gclk_edges, exp_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
