// master_clock_gen_tb -- self-checking testbench for master_clock_gen.
//
// Walks every combination of clock and Er several times in random order and
// checks the master clock: transparent (1) while the clock is low, and also
// while Er is high during the high clock phase; closed (0) only when the
// clock is high and no transition has been flagged.
`timescale 1ns / 1ps
module master_clock_gen_tb;

  logic clk, er, cm;
  int   checks = 0, failures = 0;

  master_clock_gen dut (.clk(clk), .er(er), .cm(cm));

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [1:0] v;
      logic       exp;
      v   = (i < 4) ? 2'(i) : 2'($urandom);
      clk = v[1];
      er  = v[0];
      #1;
      exp = (clk == 1'b0) ? 1'b1 : er;
      checks++;
      if (cm !== exp) begin
        failures++;
        $display("FAIL clk=%0b er=%0b: cm=%0b expected %0b", clk, er, cm, exp);
      end
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
