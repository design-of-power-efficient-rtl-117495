// tet_borrow_tb -- two capturing stages in a row: time borrowing on
// back-to-back timing errors.
//
// Builds a two-stage pipeline from the stage's blocks: launch_ff, a first
// combinational path, capturing stage A (transition detector, master clock
// generator, master-slave flip-flop), a second path and capturing stage B,
// all on one gated clock (10 ns period, 5 ns high).  When stage A receives
// late data, its output changes only after the rising edge; stage B's path
// then starts late, and its data can arrive late too.  Stage B's master
// window reopens in the same way, so both stages keep correct data without
// touching the system clock.  The paths are delayed wires:
//   * path 1: 5.5 to 9.5 ns (normal) or 10.5 to 13.5 ns (late);
//   * path 2: 5.5 ns up to 13.5 ns minus the lateness of stage A, so stage
//     B is late whenever the two add up to more than one period.
// A reference model predicts both outputs at the end of each high phase.
// The testbench counts late data in A, late data in B, and the back-to-back
// cases (B late in the cycle after A was late).  Each of these must occur.
`timescale 1ns / 1ps
module tet_borrow_tb;

  localparam int  NCYC = 2000;
  localparam real TD   = 1.0;

  logic clk, en, rst_n, d, gclk;
  logic l_q, p1, qa, p2, qb;
  logic er_a, er_b, cm_a, cm_b;
  real  d1, d2;

  logic launch_model, qa_model, qb_model, conv_a, conv_b;
  real  late_a_by;                 // how late stage A's data is this cycle
  logic prev_late_a;
  int   checks = 0, failures = 0;
  int   n_late_a = 0, n_late_b = 0, n_b2b = 0, n_gated = 0;

  clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));
  launch_ff  u_l  (.clk(gclk), .rst_n(rst_n), .d(d), .q(l_q));

  transition_detector #(.DELAY_NS(TD)) u_td_a (.in(p1), .er(er_a));
  master_clock_gen u_mcg_a (.clk(gclk), .er(er_a), .cm(cm_a));
  capture_msff     u_ff_a  (.rst_n(rst_n), .cm(cm_a), .clk(gclk), .d(p1), .q(qa));

  transition_detector #(.DELAY_NS(TD)) u_td_b (.in(p2), .er(er_b));
  master_clock_gen u_mcg_b (.clk(gclk), .er(er_b), .cm(cm_b));
  capture_msff     u_ff_b  (.rst_n(rst_n), .cm(cm_b), .clk(gclk), .d(p2), .q(qb));

  // Delayed paths (transport delay per transition).
  always begin
    @(l_q);
    fork
      automatic logic v  = l_q;
      automatic real  dl = d1;
      begin
        #(dl) p1 = v;
      end
    join_none
  end

  always begin
    @(qa);
    fork
      automatic logic v  = qa;
      automatic real  dl = d2;
      begin
        #(dl) p2 = v;
      end
    join_none
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    clk = 1'b0; en = 1'b1; rst_n = 1'b1; d = 1'b0;
    p1 = 1'b0; p2 = 1'b0; d1 = 7.0; d2 = 7.0;
    launch_model = 1'b0; qa_model = 1'b0; qb_model = 1'b0;
    late_a_by = 0.0; prev_late_a = 1'b0;
    #1 rst_n = 1'b0;   // falling edge of the asynchronous reset
    #19;
    check(qa, 1'b0, "stage A in reset");
    check(qb, 1'b0, "stage B in reset");
    rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      logic late1, late_a, late_b;
      clk = 1'b0;
      en  = (i < 8) ? 1'b1 : ($urandom_range(0, 7) != 0);
      d   = 1'($urandom);
      late1 = (i >= 2) && ($urandom_range(0, 1) == 0);
      d1 = late1 ? 10.5 + $urandom_range(0, 30) * 0.1
                 : 5.5 + $urandom_range(0, 40) * 0.1;
      // stage A's output for the coming edge changes late_a_by after it
      d2 = 5.5 + $urandom_range(0, int'((8.0 - late_a_by) * 10.0)) * 0.1;
      #5;
      conv_a = p1;
      conv_b = p2;
      clk = 1'b1;
      late_a = 1'b0;
      late_b = 1'b0;
      if (en) begin
        late_a = (conv_a !== launch_model);
        late_b = (conv_b !== qa_model);
        if (late_a) n_late_a++;
        if (late_b) n_late_b++;
        if (late_b && prev_late_a) n_b2b++;
        qb_model     = qa_model;
        qa_model     = launch_model;
        launch_model = d;
        prev_late_a  = late_a;
        // lateness of the data stage A takes at the next enabled edge
        late_a_by = (d1 > 10.0) ? d1 - 10.0 : 0.0;
      end else begin
        n_gated++;
        // arrivals during a gated cycle are in time for the next edge
        late_a_by   = 0.0;
        prev_late_a = 1'b0;
      end
      #4.9;
      check(qa, qa_model, "stage A at end of high phase");
      check(qb, qb_model, "stage B at end of high phase");
      #0.1;
    end
    $display("late data in A %0d, late data in B %0d, back-to-back %0d, gated cycles %0d",
             n_late_a, n_late_b, n_b2b, n_gated);
    checks++; if (n_late_a == 0) begin failures++; $display("FAIL no late data in A"); end
    checks++; if (n_late_b == 0) begin failures++; $display("FAIL no late data in B"); end
    checks++; if (n_b2b    == 0) begin failures++; $display("FAIL no back-to-back errors"); end
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
