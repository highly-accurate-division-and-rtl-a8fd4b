// jk_ff_tb: self-checking test of the JK flip-flop.
//
// Drives random J and K for many cycles, with occasional synchronous
// clears, and compares Q every cycle with the JK truth table (set, reset,
// toggle, hold). Also checks that Q is 1 about J/(J+K) of the time for
// independent random J and K streams, the property the stochastic
// divider relies on.
`timescale 1ns/1ps
module jk_ff_tb;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, j = 1'b0, k = 1'b0;
  logic q;
  int checks = 0, failures = 0;

  jk_ff dut (.clk, .rst_n, .clr, .j, .k, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : main
    bit  model = 1'b0;
    int  ones = 0;
    real frac;
    repeat (2) @(posedge clk);
    #1 check(q == 1'b0, "reset value");
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      clr = (c % 1000 == 999);
      // J with probability 0.3, K with probability 0.2.
      j = ($urandom_range(0, 9) < 3);
      k = ($urandom_range(0, 9) < 2);
      @(posedge clk);
      if (clr)           model = 1'b0;
      else if (j && k)   model = !model;
      else if (j)        model = 1'b1;
      else if (k)        model = 1'b0;
      #1;
      check(q == model, $sformatf("cycle %0d j=%0b k=%0b q=%0b expected %0b", c, j, k, q, model));
      ones += int'(q);
    end
    // Independent J, K: P(Q) = pJ / (pJ + pK) = 0.6.
    frac = real'(ones) / 20000.0;
    check(frac > 0.55 && frac < 0.65, $sformatf("P(Q)=%.3f, expected about 0.6", frac));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
