// image_apps_tb: the two image applications run pixel by pixel through the
// complete design (sc_top at its default parameters).
//
// A 48 x 48 synthetic low-contrast 8-bit image (values about 0.25..0.85,
// generated by a formula, see pixel()) is processed pixel by pixel, one
// 255-bit stream per pixel with fresh random seeds:
//   contrast stretching, m = 0.3, n = 0.8, on the cs_* ports;
//   gamma correction, gamma = 0.5, by all four square-root circuits at once
//   (sqrt_in), plus a separate SSRC-D circuit with a 6-flip-flop delay
//   element, the most accurate setting.
// Every output stream must match the reference model bit for bit. The
// image MSE and PSNR (10 log10(1/MSE), pixel range 1) against the exact
// functions are printed; the checks bound them and require the 6-flip-flop
// SSRC-D to beat all four default circuits. Contrast stretching is scored
// separately on the pixels inside [m, n], since above n the divider gives
// (n-m)/(x-m) rather than 1.
`timescale 1ns/1ps
module image_apps_tb;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int W = 48, H = 48;
  localparam bit [7:0] CS_M = 8'd77, CS_N = 8'd204;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]      seed_div = 8'd1, seed_cs = 8'd1, seed_d6 = 8'd1;
  logic [3:0][7:0] seed_sqrt = '0, sqrt_in = '0;
  logic [7:0]      div_x = 8'd1, div_y = 8'd1, cs_x = '0, cs_m = CS_M, cs_n = CS_N;
  logic            div_z, cs_f, d6_out;
  logic [3:0]      sqrt_out;

  int checks = 0, failures = 0;

  sc_top dut (.*);
  sc_sqrt_circuit #(.VARIANT(SSRC_D), .DE_DEPTH(6)) dut_d6
    (.clk, .rst_n, .start, .seed(seed_d6), .in_val(cs_x), .out_bit(d6_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (W * H * 260 + 1000) @(posedge clk);
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

  // Smooth gradient plus texture, values 64..217.
  function automatic bit [7:0] pixel(input int r, input int c);
    return 8'(64 + ((r * 3 + c * 2 + (r * c) % 29) % 154));
  endfunction

  function automatic real psnr(input real mse);
    return 10.0 * $log10(1.0 / mse);
  endfunction

  initial begin : main
    real se_g [5];
    real se_cs_in = 0.0, se_cs_all = 0.0;
    int  n_in = 0;
    foreach (se_g[i]) se_g[i] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        automatic bit [7:0] p = pixel(r, c);
        automatic bit [7:0] sdc = 8'($urandom_range(1, 255));
        automatic bit [7:0] sd6 = 8'($urandom_range(1, 255));
        automatic bit [3:0][7:0] sds;
        stream_t zc, zs [5];
        for (int i = 0; i < 4; i++) sds[i] = 8'($urandom_range(1, 255));
        seed_cs = sdc; seed_sqrt = sds; seed_d6 = sd6;
        cs_x = p;
        sqrt_in = {4{p}};
        @(posedge clk) #1;
        start = 1'b1;
        @(posedge clk) #1;
        start = 1'b0;
        for (int k = 0; k <= 255; k++) begin
          if (k > 0) @(posedge clk) #1;
          if (k < 255) begin
            for (int i = 0; i < 4; i++) zs[i][k] = sqrt_out[i];
            zs[4][k] = d6_out;
          end
          if (k > 0) zc[k-1] = cs_f;
        end
        begin
          automatic stream_t xs = ref_sng(sdc, p), ms = ref_sng(sdc, CS_M), ns = ref_sng(sdc, CS_N);
          automatic real e;
          check(zc == ref_div(xs & ~ms, ns & ~ms, 2), $sformatf("contrast stream mismatch at (%0d,%0d)", r, c));
          e = real'($countones(zc)) / 255.0 - ideal_cs(p, CS_M, CS_N);
          se_cs_all += e * e;
          if (p >= CS_M && p <= CS_N) begin
            se_cs_in += e * e;
            n_in++;
          end
          for (int i = 0; i < 5; i++) begin
            automatic int vv = (i < 4) ? i : 3;
            automatic int dd = (i == 0) ? 0 : (i < 4) ? 1 : 6;
            automatic bit [7:0] sd = (i < 4) ? sds[i] : sd6;
            check(zs[i] == ref_ssrc(vv, ref_sng(sd, p), dd),
                  $sformatf("gamma circuit %0d stream mismatch at (%0d,%0d)", i, r, c));
            e = real'($countones(zs[i])) / 255.0 - ideal_sqrt(p);
            se_g[i] += e * e;
          end
        end
      end
    end
    begin
      automatic real np = real'(W * H);
      $display("contrast stretching: MSE %.2fe-3 PSNR %.2f dB on pixels in [m,n] (%0d); whole image MSE %.2fe-3 PSNR %.2f dB",
               1000.0 * se_cs_in / n_in, psnr(se_cs_in / n_in), n_in,
               1000.0 * se_cs_all / np, psnr(se_cs_all / np));
      for (int i = 0; i < 5; i++)
        $display("gamma %s: MSE %.2fe-3 PSNR %.2f dB",
                 (i == 0) ? "SSRC-A        " : (i == 1) ? "SSRC-B        " :
                 (i == 2) ? "SSRC-C        " : (i == 3) ? "SSRC-D        " : "SSRC-D (6 DFF)",
                 1000.0 * se_g[i] / np, psnr(se_g[i] / np));
      check(se_cs_in / n_in < 3.0e-3, "contrast stretching MSE in [m,n]");
      for (int i = 0; i < 4; i++) begin
        check(se_g[i] / np < 14.0e-3, "gamma MSE");
        check(se_g[4] < se_g[i], "SSRC-D with 6 flip-flops is not the most accurate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
