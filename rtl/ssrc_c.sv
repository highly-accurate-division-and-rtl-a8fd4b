// ssrc_c: stochastic square root kernel, variant C (MUX + NAND + DE).
//
// A 2:1 multiplexer selects the input stream when s = 1 and a constant-1
// stream when s = 0; its output is Out. A NAND gate combines Out with s, and
// its output passes through the delay element to become s. Hence
// P(s) = 1 - P(Out)P(s), i.e. P(s) = 1/(P(Out)+1), and the MUX gives
// P(Out) = P(s)P(In) + (1-P(s)), whose solution is P(Out) = sqrt(P(In)).
// The DE (DE_DEPTH >= 1 D flip-flops) breaks the loop and decorrelates s
// from the MUX data; its reset value 0 makes the first output bit a 1.
//
// Interface: `in_bit` one input bit per clock; `out_bit` combinational from
// `in_bit` and s (same-cycle output bit). `clr` (synchronous) clears the DE.
module ssrc_c #(
  parameter int unsigned DE_DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in_bit,
  output logic out_bit
);

  if (DE_DEPTH < 1) begin : g_bad_depth
    $error("ssrc_c needs DE_DEPTH >= 1 to break the feedback loop");
  end

  logic s;         // DE output, MUX select
  logic nand_bit;  // NAND gate output, DE input

  always_comb begin
    out_bit  = s ? in_bit : 1'b1;
    nand_bit = ~(out_bit & s);
  end

  delay_element #(.DEPTH(DE_DEPTH)) u_de (
    .clk, .rst_n, .clr,
    .d (nand_bit),
    .q (s)
  );

endmodule
