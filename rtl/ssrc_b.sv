// ssrc_b: stochastic square root kernel, variant B (OR + AND + NOT + DE).
//
// Out = In OR DE(s) and s = Out AND NOT DE(s): the AND gate takes the OR
// output and its own output, inverted, after the delay element. Hence
// P(s) = P(Out)(1-P(s)), i.e. P(s) = P(Out)/(P(Out)+1), and the OR gate gives
// P(Out) = P(In) + P(s) - P(In)P(s), so P(Out) = sqrt(P(In)). The DE
// (DE_DEPTH >= 1 D flip-flops) both breaks the feedback loop and supplies
// the bit combined with the first input bit, so it cannot be empty.
//
// Interface: `in_bit` one input bit per clock; `out_bit` is combinational
// from `in_bit` and the DE output (same-cycle output stream bit). `clr`
// (synchronous) clears the DE before a new stream.
module ssrc_b #(
  parameter int unsigned DE_DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in_bit,
  output logic out_bit
);

  if (DE_DEPTH < 1) begin : g_bad_depth
    $error("ssrc_b needs DE_DEPTH >= 1 to break the feedback loop");
  end

  logic s;      // AND gate output
  logic s_del;  // s after the DE

  always_comb begin
    out_bit = in_bit | s_del;
    s       = out_bit & ~s_del;
  end

  delay_element #(.DEPTH(DE_DEPTH)) u_de (
    .clk, .rst_n, .clr,
    .d (s),
    .q (s_del)
  );

endmodule
