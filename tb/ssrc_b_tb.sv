// ssrc_b_tb: self-checking test of the square-root kernel SSRC-B
// (OR gate + AND gate + NOT gate + delay element).
//
// The testbench generates the input stream itself (reference LFSR and
// comparator) and feeds three kernels with delay elements of 1, 2 and
// 6 flip-flops. Inputs sweep 0..1 in steps of 1/20 with several random
// seeds. Every output stream must match the reference recurrence bit for
// bit (output bit k belongs to input bit k, same cycle). The decoded result
// must approximate sqrt(in) (MSE below 0.0145 for the shallowest delay
// element), and the deepest delay element must be more accurate than the
// shallowest. Inputs 0 and 1 must give outputs close to 0 and exactly 1.
`timescale 1ns/1ps
module ssrc_b_tb;
  import sc_ref_pkg::*;

  localparam int SEEDS = 20;
  localparam int NI = 3;
  localparam int DEP [NI] = '{1, 2, 6};

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_bit = 1'b0;
  logic [NI-1:0] out;
  int checks = 0, failures = 0;

  ssrc_b #(.DE_DEPTH(1)) dut0 (.clk, .rst_n, .clr, .in_bit, .out_bit(out[0]));
  ssrc_b #(.DE_DEPTH(2)) dut1 (.clk, .rst_n, .clr, .in_bit, .out_bit(out[1]));
  ssrc_b #(.DE_DEPTH(6)) dut2 (.clk, .rst_n, .clr, .in_bit, .out_bit(out[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SEEDS * 21 * 260 + 1000) @(posedge clk);
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

  task automatic run(input stream_t in_s, output stream_t got [NI]);
    @(posedge clk) #1;
    clr = 1'b1;
    @(posedge clk) #1;
    clr = 1'b0;
    for (int k = 0; k < 255; k++) begin
      in_bit = in_s[k];
      #1;
      for (int i = 0; i < NI; i++) got[i][k] = out[i];
      @(posedge clk) #1;
    end
  endtask

  initial begin : main
    real se [NI];
    int  n = 0;
    foreach (se[i]) se[i] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < SEEDS; s++) begin
      automatic bit [7:0] sd = 8'($urandom_range(1, 255));
      for (int step = 0; step <= 20; step++) begin
        automatic bit [7:0] v = 8'((step * 255 + 10) / 20);
        automatic stream_t  in_s = ref_sng(sd, v);
        stream_t got [NI];
        run(in_s, got);
        for (int i = 0; i < NI; i++) begin
          automatic real e = real'($countones(got[i])) / 255.0 - ideal_sqrt(v);
          check(got[i] == ref_ssrc(1, in_s, DEP[i]),
                $sformatf("depth %0d seed %0d in %0d: stream mismatch", DEP[i], sd, v));
          se[i] += e * e;
        end
        if (v == 8'd255) check($countones(got[0]) == 255, "input 1 does not give 1");
        if (v == 8'd0)   check($countones(got[0]) <= 2, "input 0 does not give about 0");
        n++;
      end
    end
    for (int i = 0; i < NI; i++)
      $display("SSRC-B DE=%0d: MSE=%.5f", DEP[i], se[i] / n);
    check(se[0] / n < 0.0145, "MSE too large");
    check(se[NI-1] < se[0], "deeper delay element not more accurate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
