// tet_top_tb -- end-to-end testbench of the timing-error-tolerant stage.
//
// Runs tet_top at its default parameters with a 10 ns clock (5 ns high,
// 5 ns low).  The combinational path between Flip-flop 1 and Flip-flop 2 is
// modelled here as a wire with a transport delay chosen anew for every
// launch:
//   * normal: 5.5 to 9.5 ns, data settles in the low phase, before the edge;
//   * late:  10.5 to 13.5 ns, data settles 0.5 to 3.5 ns after the next
//     rising edge, a setup violation for an ordinary flip-flop.
// The path must be longer than the 5 ns high phase, since a transition
// during the high phase is always treated as late data.
//
// A reference model predicts q: at every enabled rising edge the capturing
// flip-flop takes what the launching flip-flop held before that edge, and
// with the clock gated off both hold.  q is checked at the end of every high
// phase, by which time even late data must have reached it.  The testbench
// also records what an ordinary flip-flop sampling the path at the edge
// would have held, and counts each mechanism: normal captures, late data
// corrected through Er, Er pulses during the high phase, gated cycles and
// reset.  A mechanism that never occurs counts as a failure.
`timescale 1ns / 1ps
module tet_top_tb;

  localparam int NCYC = 2000;

  logic clk, en, rst_n, d, path_src, path_dst, q, er;
  real  path_delay;

  logic launch_model, q_model, conv_q;
  int   checks = 0, failures = 0;
  int   n_normal = 0, n_late = 0, n_gated = 0, n_er_high = 0, n_reset = 0;

  tet_top dut (
    .clk      (clk),
    .en       (en),
    .rst_n    (rst_n),
    .d        (d),
    .path_src (path_src),
    .path_dst (path_dst),
    .q        (q),
    .er       (er)
  );

  // Combinational path: a delayed copy of Flip-flop 1's output.
  // Each transition is delivered after its own delay (transport delay).
  always begin
    @(path_src);
    fork
      automatic logic v  = path_src;
      automatic real  dl = path_delay;
      begin
        #(dl) path_dst = v;
      end
    join_none
  end

  // Er pulses while the (gated) clock is high are the corrections.
  always @(posedge er) if (clk && en) n_er_high++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    clk = 1'b0; en = 1'b1; rst_n = 1'b1; d = 1'b0;
    path_dst = 1'b0; path_delay = 7.0;
    launch_model = 1'b0; q_model = 1'b0;
    #1 rst_n = 1'b0;   // falling edge of the asynchronous reset
    #19;
    check(q, 1'b0, "q in reset");
    check(path_src, 1'b0, "path_src in reset");
    n_reset++;
    rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      logic late;
      // falling edge: change the inputs while the clock is low
      clk = 1'b0;
      en  = (i < 8) ? 1'b1 : ($urandom_range(0, 5) != 0);
      d   = 1'($urandom);
      late = (i >= 2) && ($urandom_range(0, 2) == 0);
      path_delay = late ? 10.5 + $urandom_range(0, 30) * 0.1
                        : 5.5 + $urandom_range(0, 40) * 0.1;
      #5;
      // rising edge
      conv_q = path_dst;            // what an ordinary flip-flop would take
      clk = 1'b1;
      if (en) begin
        if (conv_q !== launch_model) n_late++;
        else if (q_model !== launch_model) n_normal++;
        q_model      = launch_model;
        launch_model = d;
      end else begin
        n_gated++;
      end
      #4.9;
      check(q, q_model, "q at end of high phase");
      check(path_src, launch_model, "Flip-flop 1 output");
      #0.1;
    end
    // reset in operation
    clk = 1'b0;
    rst_n = 1'b0;
    #1;
    check(q, 1'b0, "q after reset");
    check(path_src, 1'b0, "path_src after reset");
    n_reset++;

    $display("normal captures %0d, late data corrected %0d, Er pulses in high phase %0d, gated cycles %0d, resets %0d",
             n_normal, n_late, n_er_high, n_gated, n_reset);
    checks++; if (n_normal  == 0) begin failures++; $display("FAIL no normal capture"); end
    checks++; if (n_late    == 0) begin failures++; $display("FAIL no late data"); end
    checks++; if (n_er_high == 0) begin failures++; $display("FAIL no Er pulse in the high phase"); end
    checks++; if (n_gated   == 0) begin failures++; $display("FAIL no gated cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(NCYC * 10 + 1000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
