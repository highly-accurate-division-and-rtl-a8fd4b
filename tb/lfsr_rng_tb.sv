// lfsr_rng_tb: self-checking test of the LFSR random number generator.
//
// For the default 8-bit LFSR: after loading a seed, the sequence must match
// the reference recurrence of x^8+x^6+x^5+x^4+1 step by step, visit every
// non-zero value exactly once in 255 cycles and then return to the seed
// (stream length 2^N-1). A zero seed must be replaced by 1. A 4-bit and a
// 12-bit instance check that other widths also get a full-length period.
`timescale 1ns/1ps
module lfsr_rng_tb;
  import sc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [7:0]  seed8 = '0;
  logic [3:0]  seed4 = '0;
  logic [11:0] seed12 = '0;
  logic [7:0]  rnd8;
  logic [3:0]  rnd4;
  logic [11:0] rnd12;

  int checks = 0, failures = 0;

  lfsr_rng                dut8  (.clk, .rst_n, .load, .seed(seed8),  .rnd(rnd8));
  lfsr_rng #(.N(4))       dut4  (.clk, .rst_n, .load, .seed(seed4),  .rnd(rnd4));
  lfsr_rng #(.N(12))      dut12 (.clk, .rst_n, .load, .seed(seed12), .rnd(rnd12));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic do_load(input bit [7:0] s8, input bit [3:0] s4, input bit [11:0] s12);
    @(posedge clk) #1;
    load = 1'b1; seed8 = s8; seed4 = s4; seed12 = s12;
    @(posedge clk) #1;
    load = 1'b0;
  endtask

  initial begin : main
    bit seen8 [256];
    bit seen4 [16];
    bit seen12 [4096];
    int first_repeat12;
    repeat (2) @(posedge clk);
    #1 check(rnd8 == 8'd1, "reset value");
    rst_n = 1'b1;

    // Zero seed is replaced by 1.
    do_load(8'd0, 4'd0, 12'd0);
    check(rnd8 == 8'd1 && rnd4 == 4'd1 && rnd12 == 12'd1, "zero seed not replaced by 1");

    for (int t = 0; t < 4; t++) begin
      automatic bit [7:0]  s8  = 8'($urandom_range(1, 255));
      automatic bit [3:0]  s4  = 4'($urandom_range(1, 15));
      automatic bit [11:0] s12 = 12'($urandom_range(1, 4095));
      automatic bit [7:0]  expv = s8;
      foreach (seen8[i]) seen8[i] = 1'b0;
      foreach (seen4[i]) seen4[i] = 1'b0;
      do_load(s8, s4, s12);
      check(rnd8 == s8, "seed not loaded");
      for (int k = 0; k < 255; k++) begin
        check(rnd8 == expv, $sformatf("step %0d: got %0d expected %0d", k, rnd8, expv));
        check(!seen8[rnd8] && rnd8 != 0, $sformatf("value %0d repeated or zero", rnd8));
        seen8[rnd8] = 1'b1;
        if (k < 15) begin
          check(!seen4[rnd4] && rnd4 != 0, "4-bit value repeated");
          seen4[rnd4] = 1'b1;
        end
        if (k == 15) check(rnd4 == s4, "4-bit period is not 15");
        expv = ref_lfsr_next(expv);
        @(posedge clk) #1;
      end
      check(rnd8 == s8, "8-bit period is not 255");
      if (t == 0) begin
        // 12-bit: walk the whole period once.
        foreach (seen12[i]) seen12[i] = 1'b0;
        do_load(s8, s4, s12);
        first_repeat12 = -1;
        for (int k = 0; k < 4095; k++) begin
          if (seen12[rnd12] || rnd12 == 0) first_repeat12 = k;
          seen12[rnd12] = 1'b1;
          @(posedge clk) #1;
        end
        check(first_repeat12 == -1, "12-bit LFSR repeats early");
        check(rnd12 == s12, "12-bit period is not 4095");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
