// delay_element_tb: self-checking test of the delay element.
//
// Four instances with depths 0, 1, 2 and 6 see the same random bitstream.
// Each output must equal the input of DEPTH cycles earlier (0 before any
// input reached it after reset or a synchronous clear), so the check also
// covers the latency of exactly DEPTH clock cycles.
`timescale 1ns/1ps
module delay_element_tb;

  localparam int ND = 4;
  localparam int DEPTHS [ND] = '{0, 1, 2, 6};

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, d = 1'b0;
  logic [ND-1:0] q;
  int checks = 0, failures = 0;

  delay_element #(.DEPTH(0)) dut0 (.clk, .rst_n, .clr, .d, .q(q[0]));
  delay_element #(.DEPTH(1)) dut1 (.clk, .rst_n, .clr, .d, .q(q[1]));
  delay_element #(.DEPTH(2)) dut2 (.clk, .rst_n, .clr, .d, .q(q[2]));
  delay_element #(.DEPTH(6)) dut6 (.clk, .rst_n, .clr, .d, .q(q[3]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit hist [$];   // inputs since the last clear, oldest first
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      #1;
      if (k % 500 == 250) begin
        clr = 1'b1;
      end else begin
        clr = 1'b0;
      end
      d = 1'($urandom_range(0, 1));
      #1;
      // Combinational output of depth 0 follows d at once.
      for (int i = 0; i < ND; i++) begin
        automatic int  dep = DEPTHS[i];
        automatic bit  expv;
        if (dep == 0) expv = d;
        else expv = (hist.size() >= dep) ? hist[hist.size() - dep] : 1'b0;
        checks++;
        if (q[i] !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d depth %0d q=%0b expected %0b", k, dep, q[i], expv);
        end
      end
      @(posedge clk);
      if (clr) hist.delete();
      else hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
