// launch_ff_tb -- self-checking testbench for launch_ff.
//
// Applies random data with random asynchronous resets.  After each rising
// clock edge the output must equal the data present before the edge, and it
// must stay unchanged when the data changes between edges; during reset it
// must be zero.
`timescale 1ns / 1ps
module launch_ff_tb;

  logic clk, rst_n, d, q;
  logic exp_q;
  int   checks = 0, failures = 0;

  launch_ff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s at %0t: q=%0b expected %0b", what, $time, q, exp_q);
    end
  endtask

  initial begin
    clk = 1'b0; d = 1'b0; rst_n = 1'b1; exp_q = 1'b0;
    #1 rst_n = 1'b0;   // falling edge of the asynchronous reset
    #2 check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      d = 1'($urandom);
      #2 clk = 1'b1;
      exp_q = d;
      #1 check("after edge");
      d = ~d;                         // change between edges: must not pass
      #1 check("hold while clock high");
      #1 clk = 1'b0;
      #1 check("hold while clock low");
      if ($urandom_range(0, 19) == 0) begin
        rst_n = 1'b0; exp_q = 1'b0;
        #1 check("asynchronous reset");
        rst_n = 1'b1;
      end
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
