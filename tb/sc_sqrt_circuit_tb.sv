// sc_sqrt_circuit_tb: self-checking test of the complete square-root circuit.
//
// Five instances share seed and input: SSRC-A, -B, -C, -D at their smallest
// delay-element depths (0, 1, 1, 1) and SSRC-D with six flip-flops, the
// most accurate setting. The input sweeps 21 values from 0 to 1 in steps of
// 1/20, each with many random LFSR seeds. Every output stream is compared
// bit for bit with the reference model, and the decoded result ones/255 is
// compared with sqrt(in): each variant's mean squared error must stay
// below a bound (MSE_MAX, about 1.3 times the error these structures show
// with an 8-bit LFSR), and six delay flip-flops must beat one.
`timescale 1ns/1ps
module sc_sqrt_circuit_tb;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int SEEDS = 40;
  localparam int NV    = 5;
  localparam int VAR   [NV] = '{0, 1, 2, 3, 3};
  localparam int DEP   [NV] = '{0, 1, 1, 1, 6};
  localparam real MSE_MAX [NV] = '{0.0145, 0.0145, 0.0145, 0.0145, 0.0070};

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [7:0] seed = 8'd1, in_val = '0;
  logic [NV-1:0] out;

  int checks = 0, failures = 0;

  sc_sqrt_circuit #(.VARIANT(SSRC_A), .DE_DEPTH(0)) dut_a  (.clk, .rst_n, .start, .seed, .in_val, .out_bit(out[0]));
  sc_sqrt_circuit #(.VARIANT(SSRC_B), .DE_DEPTH(1)) dut_b  (.clk, .rst_n, .start, .seed, .in_val, .out_bit(out[1]));
  sc_sqrt_circuit #(.VARIANT(SSRC_C), .DE_DEPTH(1)) dut_c  (.clk, .rst_n, .start, .seed, .in_val, .out_bit(out[2]));
  sc_sqrt_circuit #(.VARIANT(SSRC_D), .DE_DEPTH(1)) dut_d  (.clk, .rst_n, .start, .seed, .in_val, .out_bit(out[3]));
  sc_sqrt_circuit #(.VARIANT(SSRC_D), .DE_DEPTH(6)) dut_d6 (.clk, .rst_n, .start, .seed, .in_val, .out_bit(out[4]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (21 * SEEDS * 260 + 1000) @(posedge clk);
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

  // Output bit k is the same-cycle output of input bit k.
  task automatic run(input bit [7:0] sd, input bit [7:0] v, output stream_t got [NV]);
    @(posedge clk) #1;
    start = 1'b1; seed = sd; in_val = v;
    @(posedge clk) #1;
    start = 1'b0;
    for (int k = 0; k < 255; k++) begin
      if (k > 0) @(posedge clk) #1;
      for (int i = 0; i < NV; i++) got[i][k] = out[i];
    end
  endtask

  initial begin : main
    real se [NV];
    int  n = 0;
    for (int i = 0; i < NV; i++) se[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < SEEDS; s++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      for (int step = 0; step <= 20; step++) begin
        automatic bit [7:0] v = 8'((step * 255 + 10) / 20);
        stream_t  got [NV];
        automatic stream_t in_s = ref_sng(sd, v);
        run(sd, v, got);
        for (int i = 0; i < NV; i++) begin
          automatic stream_t exp = ref_ssrc(VAR[i], in_s, DEP[i]);
          automatic real     err = real'($countones(got[i])) / 255.0 - ideal_sqrt(v);
          check(got[i] == exp, $sformatf("variant %0d depth %0d seed %0d in %0d: stream mismatch",
                                         VAR[i], DEP[i], sd, v));
          se[i] += err * err;
        end
        n++;
      end
    end
    for (int i = 0; i < NV; i++) begin
      $display("SSRC-%c DE=%0d: MSE=%.5f (bound %.4f)", 8'(65 + VAR[i]), DEP[i], se[i] / n, MSE_MAX[i]);
      check(se[i] / n < MSE_MAX[i], "MSE bound");
    end
    check(se[4] < se[3], "SSRC-D: six DE flip-flops not more accurate than one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
