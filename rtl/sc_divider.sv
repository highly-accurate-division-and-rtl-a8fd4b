// sc_divider: stochastic divider kernel computing MIN(x,y)/MAX(x,y).
//
// The two input streams X and Y must be maximally correlated, i.e. produced
// by comparators sharing one RNG. Then an AND gate gives a stream of value
// MIN(x,y) and an XOR gate one of value |x-y|. The AND stream drives the J
// input of a JK flip-flop and the XOR stream its K input; since Q settles to
// J/(J+K), the output is MIN/(MIN+|x-y|) = MIN(x,y)/MAX(x,y). So the circuit
// divides the smaller input by the larger whichever port each arrives on.
// Because J and K are never 1 together (correlation -1), a delay element of
// DE_DEPTH D flip-flops is inserted in the J path to decorrelate them; two
// flip-flops is the preferred accuracy/area trade-off and the default.
//
// Interface: one bit of each input stream per clock; `z` is the JK
// flip-flop output, so it reflects input bits up to the previous cycle.
// `clr` (synchronous) clears the DE and the flip-flop before a new stream.
module sc_divider #(
  parameter int unsigned DE_DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic x_bit,
  input  logic y_bit,
  output logic z
);

  logic min_bit;   // AND: MIN(x,y) for correlated inputs
  logic diff_bit;  // XOR: |x-y| for correlated inputs
  logic j_bit;

  always_comb begin
    min_bit  = x_bit & y_bit;
    diff_bit = x_bit ^ y_bit;
  end

  delay_element #(.DEPTH(DE_DEPTH)) u_de (
    .clk, .rst_n, .clr,
    .d (min_bit),
    .q (j_bit)
  );

  jk_ff #(.INIT(1'b0)) u_jk (
    .clk, .rst_n, .clr,
    .j (j_bit),
    .k (diff_bit),
    .q (z)
  );

endmodule
