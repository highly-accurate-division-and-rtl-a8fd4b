// ssrc_d: stochastic square root kernel, variant D (MUX + AND + NOT + DE).
//
// Like variant C with the MUX inputs swapped and the inversion moved: the
// MUX selects the input stream when s = 0 and a constant-1 stream when
// s = 1. An AND gate combines Out with NOT s, and its output passes through
// the delay element to become s. Hence P(s) = P(Out)(1-P(s)), i.e.
// P(s) = P(Out)/(P(Out)+1), and the MUX gives P(Out) = P(s) + (1-P(s))P(In),
// whose solution is P(Out) = sqrt(P(In)). The DE (DE_DEPTH >= 1 D flip-flops)
// breaks the loop; deeper DEs (6 flip-flops is the recommended accurate
// setting) lower the error. Cycle by cycle, the loop reduces to
// s(k) = In(k) AND NOT s(k-d), Out(k) = In(k) OR s(k-d), the same recurrence
// as ssrc_b.
//
// Interface: `in_bit` one input bit per clock; `out_bit` combinational from
// `in_bit` and s (same-cycle output bit). `clr` (synchronous) clears the DE.
module ssrc_d #(
  parameter int unsigned DE_DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic in_bit,
  output logic out_bit
);

  if (DE_DEPTH < 1) begin : g_bad_depth
    $error("ssrc_d needs DE_DEPTH >= 1 to break the feedback loop");
  end

  logic s;        // DE output, MUX select
  logic and_bit;  // AND gate output, DE input

  always_comb begin
    out_bit = s ? 1'b1 : in_bit;
    and_bit = out_bit & ~s;
  end

  delay_element #(.DEPTH(DE_DEPTH)) u_de (
    .clk, .rst_n, .clr,
    .d (and_bit),
    .q (s)
  );

endmodule
