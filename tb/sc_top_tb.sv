// sc_top_tb: end-to-end test of the whole design at its default sizes.
//
// Each operation pulses `start` with fresh seeds and operands for all
// units at once: the divider, the four square-root circuits and the
// contrast-stretching circuit (m = 0.3, n = 0.8). The streams are captured
// with the timing of the top-level header (square roots in cycles 1..255
// after `start`, divider and contrast stretching one cycle later) and
// compared bit for bit with the reference models; decoded results are
// checked against the ideal functions. Counted mechanisms, each of which
// must occur at least once: divider with x >= y and with x < y (operand
// order does not matter), each square-root variant, the three contrast
// stretching regions, a restart in the middle of a stream, and an all-zero
// seed replaced by 1.
`timescale 1ns/1ps
module sc_top_tb;
  import sc_ref_pkg::*;

  localparam int OPS = 60;
  localparam bit [7:0] CS_M = 8'd77, CS_N = 8'd204;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]      seed_div = 8'd1, seed_cs = 8'd1;
  logic [3:0][7:0] seed_sqrt = '0, sqrt_in = '0;
  logic [7:0]      div_x = '0, div_y = '0, cs_x = '0, cs_m = CS_M, cs_n = CS_N;
  logic            div_z, cs_f;
  logic [3:0]      sqrt_out;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_div_ge = 0, n_div_lt = 0, n_sqrt [4] = '{0, 0, 0, 0};
  int n_cs_lo = 0, n_cs_mid = 0, n_cs_hi = 0, n_restart = 0, n_zero_seed = 0;

  sc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (OPS * 270 + 2000) @(posedge clk);
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

  task automatic pulse_start();
    @(posedge clk) #1;
    start = 1'b1;
    @(posedge clk) #1;
    start = 1'b0;
  endtask

  // Captures the output streams of one operation started just before.
  task automatic capture(output stream_t zd, output stream_t zc, output stream_t zs [4]);
    for (int k = 0; k <= 255; k++) begin
      if (k > 0) @(posedge clk) #1;
      if (k < 255) for (int i = 0; i < 4; i++) zs[i][k] = sqrt_out[i];
      if (k > 0) begin
        zd[k-1] = div_z;
        zc[k-1] = cs_f;
      end
    end
  endtask

  initial begin : main
    localparam int DEP [4] = '{0, 1, 1, 1};
    real se_div = 0.0, se_sqrt = 0.0, se_cs = 0.0;
    int  n_cs = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < OPS; op++) begin
      stream_t zd, zc, zs [4];
      automatic bit [7:0] sdd = 8'($urandom_range(1, 255));
      automatic bit [7:0] sdc = 8'($urandom_range(1, 255));
      automatic bit [7:0] xv = 8'($urandom_range(8, 255));
      automatic bit [7:0] yv = 8'($urandom_range(8, 255));
      automatic bit [7:0] cx = 8'($urandom_range(0, 255));
      automatic bit [3:0][7:0] sds, vin;
      for (int i = 0; i < 4; i++) begin
        sds[i] = 8'($urandom_range(1, 255));
        vin[i] = 8'($urandom_range(0, 255));
      end
      if (op == 1) sdd = 8'd0;  // all-zero seed: the LFSR must use 1
      if (op == 2) begin xv = 8'd60; yv = 8'd180; end
      if (op == 3) begin xv = 8'd180; yv = 8'd60; end
      if (op == 4) cx = 8'd20;
      if (op == 5) cx = 8'd140;
      if (op == 6) cx = 8'd240;

      seed_div = sdd; seed_cs = sdc; seed_sqrt = sds;
      div_x = xv; div_y = yv; cs_x = cx; sqrt_in = vin;
      if (op % 10 == 7) begin
        // Restart in the middle of a stream.
        pulse_start();
        repeat (100) @(posedge clk);
        #1 n_restart++;
      end
      pulse_start();
      capture(zd, zc, zs);

      begin
        automatic stream_t ref_z = ref_div(ref_sng(sdd, xv), ref_sng(sdd, yv), 2);
        automatic stream_t xs = ref_sng(sdc, cx), ms = ref_sng(sdc, CS_M), ns = ref_sng(sdc, CS_N);
        automatic real     e;
        check(zd == ref_z, $sformatf("op %0d: divider stream mismatch", op));
        if (sdd == 0) n_zero_seed++;
        if (xv >= yv) n_div_ge++; else n_div_lt++;
        e = real'($countones(zd)) / 255.0 - ideal_div(xv, yv);
        se_div += e * e;
        check(zc == ref_div(xs & ~ms, ns & ~ms, 2), $sformatf("op %0d: contrast stream mismatch", op));
        if (cx < CS_M) begin
          n_cs_lo++;
          check($countones(zc) == 0, "contrast stretching below m is not 0");
        end else if (cx <= CS_N) begin
          n_cs_mid++;
          e = real'($countones(zc)) / 255.0 - ideal_cs(cx, CS_M, CS_N);
          se_cs += e * e;
          n_cs++;
        end else begin
          n_cs_hi++;
        end
        for (int i = 0; i < 4; i++) begin
          check(zs[i] == ref_ssrc(i, ref_sng(sds[i], vin[i]), DEP[i]),
                $sformatf("op %0d: SSRC %0d stream mismatch", op, i));
          e = real'($countones(zs[i])) / 255.0 - ideal_sqrt(vin[i]);
          se_sqrt += e * e;
          n_sqrt[i]++;
        end
      end
    end
    $display("MSE: divider %.5f, square root %.5f, contrast stretching (m..n) %.5f",
             se_div / OPS, se_sqrt / (4 * OPS), se_cs / n_cs);
    $display("mechanisms: div x>=y %0d, x<y %0d, SSRC A/B/C/D %0d/%0d/%0d/%0d, cs below/in/above %0d/%0d/%0d, restart %0d, zero seed %0d",
             n_div_ge, n_div_lt, n_sqrt[0], n_sqrt[1], n_sqrt[2], n_sqrt[3],
             n_cs_lo, n_cs_mid, n_cs_hi, n_restart, n_zero_seed);
    check(se_div / OPS < 0.0055, "divider MSE");
    check(se_sqrt / (4 * OPS) < 0.0145, "square root MSE");
    check(se_cs / n_cs < 0.005, "contrast stretching MSE");
    check(n_div_ge > 0, "divider x>=y never exercised");
    check(n_div_lt > 0, "divider x<y never exercised");
    for (int i = 0; i < 4; i++) check(n_sqrt[i] > 0, "square root variant never exercised");
    check(n_cs_lo > 0 && n_cs_mid > 0 && n_cs_hi > 0, "contrast stretching region never exercised");
    check(n_restart > 0, "restart never exercised");
    check(n_zero_seed > 0, "zero seed never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
