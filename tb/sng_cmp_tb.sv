// sng_cmp_tb: exhaustive test of the SNG comparator.
//
// For every pair (rnd, x) of 8-bit values the output must be 1 exactly when
// rnd <= x. Summed over one LFSR period (rnd = 1..255) the number of ones
// must equal x, i.e. the stream encodes x/255 without error.
`timescale 1ns/1ps
module sng_cmp_tb;

  logic [7:0] rnd, x;
  logic       b;
  int checks = 0, failures = 0;

  sng_cmp dut (.rnd, .x, .bit_o(b));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int xv = 0; xv < 256; xv++) begin
      automatic int ones = 0;
      for (int r = 0; r < 256; r++) begin
        rnd = 8'(r); x = 8'(xv);
        #1;
        checks++;
        if (b !== (r <= xv)) begin
          failures++;
          if (failures < 10) $display("FAIL: rnd=%0d x=%0d bit=%0b", r, xv, b);
        end
        if (r > 0) ones += int'(b);
      end
      checks++;
      if (ones != xv) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d gives %0d ones per period", xv, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
