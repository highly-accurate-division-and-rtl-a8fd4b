// de_depth_sweep_tb: accuracy of every circuit against the depth of its
// delay element (DE), 0 to 7 flip-flops.
//
// Divider: 2000 random (x, y) pairs, each with a random seed, through eight
// sc_div_circuit instances with DE depths 0..7. Square root: 21 inputs from
// 0 to 1 in steps of 1/20, each with 100 random seeds, through
// sc_sqrt_circuit instances of SSRC-A (depths 0..7) and SSRC-B, -C, -D
// (depths 1..7; they need at least one flip-flop). Every stream is compared
// bit for bit with the reference model. The table of MSE and MAE is
// printed, and the checks require that a delay element helps: divider with
// 2 flip-flops at least twice as accurate as without, and each square-root
// variant more accurate at depth 7 than at its smallest depth.
`timescale 1ns/1ps
module de_depth_sweep_tb;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int PAIRS = 2000;
  localparam int SEEDS = 100;
  localparam int ND = 8;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] seed = 8'd1, x = '0, y = '0, in_val = '0;
  logic [ND-1:0] z;
  logic [3:0][ND-1:0] sq;   // [variant][depth]

  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_dep
    sc_div_circuit #(.DE_DEPTH(d)) u_div (.clk, .rst_n, .start, .seed, .x, .y, .z(z[d]));
    sc_sqrt_circuit #(.VARIANT(SSRC_A), .DE_DEPTH(d)) u_a
      (.clk, .rst_n, .start, .seed, .in_val, .out_bit(sq[0][d]));
    if (d >= 1) begin : g_bcd
      sc_sqrt_circuit #(.VARIANT(SSRC_B), .DE_DEPTH(d)) u_b
        (.clk, .rst_n, .start, .seed, .in_val, .out_bit(sq[1][d]));
      sc_sqrt_circuit #(.VARIANT(SSRC_C), .DE_DEPTH(d)) u_c
        (.clk, .rst_n, .start, .seed, .in_val, .out_bit(sq[2][d]));
      sc_sqrt_circuit #(.VARIANT(SSRC_D), .DE_DEPTH(d)) u_d
        (.clk, .rst_n, .start, .seed, .in_val, .out_bit(sq[3][d]));
    end else begin : g_none
      assign sq[1][d] = 1'b0;
      assign sq[2][d] = 1'b0;
      assign sq[3][d] = 1'b0;
    end
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((PAIRS + 21 * SEEDS) * 260 + 1000) @(posedge clk);
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

  initial begin : main
    real dse [ND], dae [ND];
    real sse [4][ND], sae [4][ND];
    int  nd = 0, ns = 0;
    foreach (dse[d]) begin dse[d] = 0.0; dae[d] = 0.0; end
    foreach (sse[v, d]) begin sse[v][d] = 0.0; sae[v][d] = 0.0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Division.
    for (int p = 0; p < PAIRS; p++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      automatic bit [7:0] xv = 8'($urandom_range(0, 255));
      automatic bit [7:0] yv = 8'($urandom_range(0, 255));
      automatic stream_t  xs = ref_sng(sd, xv), ys = ref_sng(sd, yv);
      stream_t got [ND];
      seed = sd; x = xv; y = yv;
      pulse_start();
      for (int k = 0; k < 255; k++) begin
        @(posedge clk) #1;
        for (int d = 0; d < ND; d++) got[d][k] = z[d];
      end
      for (int d = 0; d < ND; d++)
        check(got[d] == ref_div(xs, ys, d), $sformatf("divider depth %0d mismatch", d));
      if ((xv > yv ? xv : yv) >= 8) begin
        for (int d = 0; d < ND; d++) begin
          automatic real e = real'($countones(got[d])) / 255.0 - ideal_div(xv, yv);
          dse[d] += e * e;
          dae[d] += (e < 0.0) ? -e : e;
        end
        nd++;
      end
    end

    // Square root.
    for (int s = 0; s < SEEDS; s++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      for (int step = 0; step <= 20; step++) begin
        automatic bit [7:0] v = 8'((step * 255 + 10) / 20);
        automatic stream_t  in_s = ref_sng(sd, v);
        stream_t got [4][ND];
        seed = sd; in_val = v;
        pulse_start();
        for (int k = 0; k < 255; k++) begin
          if (k > 0) @(posedge clk) #1;
          for (int vv = 0; vv < 4; vv++)
            for (int d = 0; d < ND; d++) got[vv][d][k] = sq[vv][d];
        end
        for (int vv = 0; vv < 4; vv++) begin
          for (int d = (vv == 0 ? 0 : 1); d < ND; d++) begin
            automatic real e = real'($countones(got[vv][d])) / 255.0 - ideal_sqrt(v);
            check(got[vv][d] == ref_ssrc(vv, in_s, d),
                  $sformatf("SSRC %0d depth %0d mismatch", vv, d));
            sse[vv][d] += e * e;
            sae[vv][d] += (e < 0.0) ? -e : e;
          end
        end
        ns++;
      end
    end

    $display("DE depth              0      1      2      3      4      5      6      7   (x1e-2)");
    $display("divider   MSE  %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f",
             100*dse[0]/nd, 100*dse[1]/nd, 100*dse[2]/nd, 100*dse[3]/nd,
             100*dse[4]/nd, 100*dse[5]/nd, 100*dse[6]/nd, 100*dse[7]/nd);
    $display("divider   MAE  %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f",
             100*dae[0]/nd, 100*dae[1]/nd, 100*dae[2]/nd, 100*dae[3]/nd,
             100*dae[4]/nd, 100*dae[5]/nd, 100*dae[6]/nd, 100*dae[7]/nd);
    for (int vv = 0; vv < 4; vv++) begin
      $display("SSRC-%c    MSE  %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f", 8'(65 + vv),
               100*sse[vv][0]/ns, 100*sse[vv][1]/ns, 100*sse[vv][2]/ns, 100*sse[vv][3]/ns,
               100*sse[vv][4]/ns, 100*sse[vv][5]/ns, 100*sse[vv][6]/ns, 100*sse[vv][7]/ns);
      $display("SSRC-%c    MAE  %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f", 8'(65 + vv),
               100*sae[vv][0]/ns, 100*sae[vv][1]/ns, 100*sae[vv][2]/ns, 100*sae[vv][3]/ns,
               100*sae[vv][4]/ns, 100*sae[vv][5]/ns, 100*sae[vv][6]/ns, 100*sae[vv][7]/ns);
    end
    check(2.0 * dse[2] < dse[0], "divider: two DE flip-flops do not halve the MSE");
    for (int vv = 0; vv < 4; vv++)
      check(sse[vv][7] < sse[vv][vv == 0 ? 0 : 1],
            $sformatf("SSRC %0d: depth 7 not more accurate than the smallest depth", vv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
