// sc_div_circuit_tb: self-checking test of the complete division circuit.
//
// Runs random (x, y) pairs with random LFSR seeds, 255-bit streams each.
// Every output stream is compared bit for bit with the reference model
// (LFSR + comparators + divider recurrence, sc_ref_pkg), and the decoded
// quotient ones/255 is compared with MIN(x,y)/MAX(x,y): the mean squared
// and mean absolute error over all pairs must stay within bounds set from
// the accuracy expected with a 2-flip-flop delay element (MSE below
// 5.5e-3, MAE below 6.5e-2), and a second instance without delay element
// must be clearly less accurate.
// Also checks the timing: the output stream starts one cycle after the
// first input bit and the whole result takes 255 cycles after `start`.
`timescale 1ns/1ps
module sc_div_circuit_tb;
  import sc_ref_pkg::*;

  localparam int PAIRS = 2000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [7:0] seed = 8'd1, x = '0, y = '0;
  logic       z, z0;

  int checks = 0, failures = 0;

  sc_div_circuit dut (.clk, .rst_n, .start, .seed, .x, .y, .z);
  sc_div_circuit #(.DE_DEPTH(0)) dut0 (.clk, .rst_n, .start, .seed, .x, .y, .z(z0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (PAIRS * 260 + 1000) @(posedge clk);
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

  task automatic run(input bit [7:0] sd, input bit [7:0] xv, input bit [7:0] yv,
                     output stream_t got, output stream_t got0,
                     output int cycles);
    @(posedge clk) #1;
    start = 1'b1; seed = sd; x = xv; y = yv;
    @(posedge clk) #1;
    start = 1'b0;
    cycles = 0;
    for (int k = 0; k < 255; k++) begin
      @(posedge clk) #1;
      cycles++;
      got[k] = z;
      got0[k] = z0;
    end
  endtask

  initial begin : main
    real se = 0.0, se0 = 0.0, ae = 0.0, mse, mae;
    int  used = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < PAIRS; p++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      automatic bit [7:0] xv = 8'($urandom_range(0, 255));
      automatic bit [7:0] yv = 8'($urandom_range(0, 255));
      stream_t  got, got0, exp;
      int       cyc;
      real      err;
      if (p == 0) begin xv = 8'd200; yv = 8'd100; end  // x >= y
      if (p == 1) begin xv = 8'd100; yv = 8'd200; end  // x < y
      run(sd, xv, yv, got, got0, cyc);
      exp = ref_div(ref_sng(sd, xv), ref_sng(sd, yv), 2);
      check(got == exp, $sformatf("stream mismatch seed=%0d x=%0d y=%0d", sd, xv, yv));
      check(cyc == 255, "stream length");
      check(got0 == ref_div(ref_sng(sd, xv), ref_sng(sd, yv), 0),
            $sformatf("no-DE stream mismatch seed=%0d x=%0d y=%0d", sd, xv, yv));
      if (p < 2) begin
        // Both orders of the same operands must give the same quotient,
        // close to 100/200.
        err = real'($countones(got)) / 255.0 - 0.5;
        check(err < 0.1 && err > -0.1, $sformatf("quotient of 100,200 order %0d: %0d/255",
                                                p, $countones(got)));
      end
      if ((xv > yv ? xv : yv) >= 8) begin  // skip near 0/0
        err = real'($countones(got)) / 255.0 - ideal_div(xv, yv);
        se += err * err;
        ae += (err < 0.0) ? -err : err;
        err = real'($countones(got0)) / 255.0 - ideal_div(xv, yv);
        se0 += err * err;
        used++;
      end
    end
    mse = se / used;
    mae = ae / used;
    $display("divider: %0d pairs, MSE=%.5f MAE=%.5f (no DE: MSE=%.5f)", used, mse, mae, se0 / used);
    check(mse < 0.0055, $sformatf("MSE %.5f too large", mse));
    check(mae < 0.065, $sformatf("MAE %.5f too large", mae));
    check(se < 0.7 * se0, "delay element does not improve accuracy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
