// ssrc_a: stochastic square root kernel, variant A (OR gate + JKFF + DE).
//
// Out = In OR DE(s), where s is the Q output of a JK flip-flop with J = Out
// and K tied to 1. With K = 1 the flip-flop computes s' = Out AND NOT s, so
// P(s) = P(Out)/(P(Out)+1); the OR gate then gives
// P(Out) = P(In) + P(s) - P(In)P(s), whose solution is P(Out) = sqrt(P(In)).
// The DE (DE_DEPTH D flip-flops) reduces the correlation between s and the
// output. DE_DEPTH may be 0: the flip-flop's initial value (0 here, this
// design's choice) is then the bit combined with the first input bit.
//
// Interface: `in_bit` is one bit of the input stream per clock; `out_bit` is
// combinational from `in_bit` and registered state, i.e. the output stream
// bit of the same cycle. `clr` (synchronous) clears the state before a new
// stream.
module ssrc_a #(
  parameter int unsigned DE_DEPTH = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in_bit,
  output logic out_bit
);

  logic s;        // JKFF output
  logic s_del;    // s after the DE

  delay_element #(.DEPTH(DE_DEPTH)) u_de (
    .clk, .rst_n, .clr,
    .d (s),
    .q (s_del)
  );

  always_comb out_bit = in_bit | s_del;

  jk_ff #(.INIT(1'b0)) u_jk (
    .clk, .rst_n, .clr,
    .j (out_bit),
    .k (1'b1),
    .q (s)
  );

endmodule
