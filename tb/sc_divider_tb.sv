// sc_divider_tb: self-checking test of the divider kernel on its own.
//
// The testbench generates the two maximally correlated input streams
// itself (reference LFSR and comparators sharing one random number) and
// feeds them to kernels with delay elements of 2 (the default) and 4
// flip-flops. Each output stream must match the reference recurrence bit
// for bit, with the JK flip-flop output trailing its inputs by one cycle.
// Swapping the two inputs must give the same quotient, and the decoded
// result must approximate MIN/MAX.
`timescale 1ns/1ps
module sc_divider_tb;
  import sc_ref_pkg::*;

  localparam int RUNS = 300;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, xb = 1'b0, yb = 1'b0;
  logic z2, z4;
  int checks = 0, failures = 0;

  sc_divider                 dut2 (.clk, .rst_n, .clr, .x_bit(xb), .y_bit(yb), .z(z2));
  sc_divider #(.DE_DEPTH(4)) dut4 (.clk, .rst_n, .clr, .x_bit(xb), .y_bit(yb), .z(z4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (RUNS * 2 * 260 + 1000) @(posedge clk);
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

  task automatic run(input stream_t xs, input stream_t ys, output stream_t g2, output stream_t g4);
    @(posedge clk) #1;
    clr = 1'b1;
    @(posedge clk) #1;
    clr = 1'b0;
    for (int k = 0; k < 255; k++) begin
      xb = xs[k]; yb = ys[k];
      @(posedge clk) #1;
      g2[k] = z2; g4[k] = z4;
    end
  endtask

  initial begin : main
    real se = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      automatic bit [7:0] xv = 8'($urandom_range(16, 255));
      automatic bit [7:0] yv = 8'($urandom_range(16, 255));
      automatic stream_t  xs = ref_sng(sd, xv);
      automatic stream_t  ys = ref_sng(sd, yv);
      stream_t g2, g4, h2, h4;
      real e;
      run(xs, ys, g2, g4);
      check(g2 == ref_div(xs, ys, 2), $sformatf("depth 2 mismatch x=%0d y=%0d", xv, yv));
      check(g4 == ref_div(xs, ys, 4), $sformatf("depth 4 mismatch x=%0d y=%0d", xv, yv));
      run(ys, xs, h2, h4);
      check(h2 == ref_div(ys, xs, 2), "depth 2 mismatch, swapped inputs");
      // J/K see the same MIN and |x-y| streams whichever port gets which.
      check(h2 == g2, $sformatf("swapping inputs changes the result x=%0d y=%0d", xv, yv));
      e = real'($countones(g2)) / 255.0 - ideal_div(xv, yv);
      se += e * e;
    end
    $display("kernel MSE over %0d runs: %.5f", RUNS, se / RUNS);
    check(se / RUNS < 0.0055, "MSE too large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
