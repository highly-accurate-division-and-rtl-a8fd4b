// contrast_stretch_tb: self-checking test of the contrast-stretching circuit.
//
// Bounds m = 0.3 and n = 0.8 (77/255 and 204/255). Every pixel value
// x = 0..255 is run with a random LFSR seed. The output stream must match
// the reference model (shared-RNG comparators, X AND NOT M over N AND NOT M
// into the divider recurrence) bit for bit. Region by region:
//   x < m       the numerator stream is empty, so the output is exactly 0;
//   m <= x <= n the result approximates (x-m)/(n-m) (MSE bound 5e-3);
//   x > n       the divider returns MIN/MAX = (n-m)/(x-m), checked against
//               that value rather than the ideal 1.
// Each region must be visited.
`timescale 1ns/1ps
module contrast_stretch_tb;
  import sc_ref_pkg::*;

  localparam bit [7:0] M = 8'd77;
  localparam bit [7:0] NB = 8'd204;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] seed = 8'd1, x = '0, m = M, n = NB;
  logic       f;
  int checks = 0, failures = 0;

  contrast_stretch dut (.clk, .rst_n, .start, .seed, .x, .m, .n, .f);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (256 * 260 + 1000) @(posedge clk);
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

  task automatic run(input bit [7:0] sd, input bit [7:0] xv, output stream_t got);
    @(posedge clk) #1;
    start = 1'b1; seed = sd; x = xv;
    @(posedge clk) #1;
    start = 1'b0;
    for (int k = 0; k < 255; k++) begin
      @(posedge clk) #1;
      got[k] = f;
    end
  endtask

  initial begin : main
    real se_mid = 0.0, se_hi = 0.0;
    int  n_lo = 0, n_mid = 0, n_hi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int xv = 0; xv < 256; xv++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      automatic stream_t  xs = ref_sng(sd, 8'(xv));
      automatic stream_t  ms = ref_sng(sd, M);
      automatic stream_t  ns = ref_sng(sd, NB);
      automatic real      r;
      stream_t got;
      run(sd, 8'(xv), got);
      check(got == ref_div(xs & ~ms, ns & ~ms, 2), $sformatf("stream mismatch x=%0d", xv));
      r = real'($countones(got)) / 255.0;
      if (xv < M) begin
        check($countones(got) == 0, $sformatf("x=%0d below m gives %0d ones", xv, $countones(got)));
        n_lo++;
      end else if (xv <= NB) begin
        se_mid += (r - ideal_cs(xv, M, NB)) ** 2;
        n_mid++;
      end else begin
        se_hi += (r - real'(NB - M) / real'(xv - M)) ** 2;
        n_hi++;
      end
    end
    $display("m<=x<=n: MSE=%.5f over %0d; x>n: MSE vs (n-m)/(x-m)=%.5f over %0d; x<m: %0d",
             se_mid / n_mid, n_mid, se_hi / n_hi, n_hi, n_lo);
    check(n_lo > 0 && n_mid > 0 && n_hi > 0, "a region was not visited");
    check(se_mid / n_mid < 0.005, "MSE in the stretched range too large");
    check(se_hi / n_hi < 0.005, "MSE above n too large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
