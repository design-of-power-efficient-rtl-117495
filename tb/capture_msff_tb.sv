// capture_msff_tb -- self-checking testbench for capture_msff.
//
// Drives the master clock cm and the slave clock clk directly.  Each cycle
// first behaves like an ordinary rising-edge flip-flop (cm = not clk): data
// set during the low phase appears at q after the rising edge and a change
// after the edge does not pass.  Then, in some cycles, the data changes late
// (during the high phase) and cm is pulsed high as the master clock
// generator does on Er: q must take the late value and keep it after the
// pulse.  Reset and the low phase (q must hold) are checked as well.
`timescale 1ns / 1ps
module capture_msff_tb;

  logic rst_n, cm, clk, d, q;
  logic exp_q;
  int   checks = 0, failures = 0, late = 0;

  capture_msff dut (.rst_n(rst_n), .cm(cm), .clk(clk), .d(d), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s at %0t: q=%0b expected %0b", what, $time, q, exp_q);
    end
  endtask

  initial begin
    rst_n = 1'b0; clk = 1'b0; cm = 1'b1; d = 1'b1; exp_q = 1'b0;
    #2 check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      // low phase: master open, slave closed, q holds
      d = 1'($urandom);
      #2 check("hold in low phase");
      // rising edge
      cm = 1'b0;
      clk = 1'b1;
      exp_q = d;
      #1 check("after rising edge");
      if (i % 3 != 0) begin
        // late data with a reopened master window
        d = ~d;
        #0.5 check("late data before the window");
        cm = 1'b1;
        exp_q = d;
        late++;
        #0.5 check("late data inside the window");
        cm = 1'b0;
        #0.5 check("late data after the window");
        d = ~d;
        #0.5 check("change after the window is blocked");
      end else begin
        d = ~d;
        #2 check("change after the edge is blocked");
      end
      // falling edge
      clk = 1'b0;
      cm = 1'b1;
      #1 check("hold after falling edge");
    end
    $display("late windows exercised: %0d", late);
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
