// sc_sqrt_circuit: complete stochastic square root circuit, SNG plus kernel.
//
// An LFSR and a comparator turn the binary input into a stream, which one of
// the four square-root kernels (SSRC-A..D, chosen by VARIANT) maps to a
// stream encoding sqrt(in). Used as it is, this is also the gamma
// correction datapath for gamma = 0.5 (out = in^0.5). DE_DEPTH defaults to
// the smallest depth the chosen kernel runs with (0 for A, 1 otherwise);
// a deeper DE (for instance SSRC-D with DE_DEPTH = 6) is more accurate.
// VARIANT defaults to SSRC-D, this design's choice.
//
// Timing: pulse `start` for one cycle with `seed` and `in_val` valid
// (`in_val` then stays stable). The next 2^N-1 cycles carry the stream and
// `out_bit` is the output bit of the same cycle (count ones of `out_bit`
// over cycles 1..2^N-1 after `start`).
module sc_sqrt_circuit
  import sc_pkg::*;
#(
  parameter int unsigned   N        = SC_N,
  parameter ssrc_variant_e VARIANT  = SSRC_D,
  parameter int unsigned   DE_DEPTH = ssrc_min_de(VARIANT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] seed,
  input  logic [N-1:0] in_val,
  output logic         out_bit
);

  logic [N-1:0] rnd;
  logic         in_bit;

  lfsr_rng #(.N(N)) u_rng (
    .clk, .rst_n,
    .load (start),
    .seed,
    .rnd
  );

  sng_cmp #(.N(N)) u_cmp (.rnd, .x(in_val), .bit_o(in_bit));

  if (VARIANT == SSRC_A) begin : g_a
    ssrc_a #(.DE_DEPTH(DE_DEPTH)) u_k (.clk, .rst_n, .clr(start), .in_bit, .out_bit);
  end else if (VARIANT == SSRC_B) begin : g_b
    ssrc_b #(.DE_DEPTH(DE_DEPTH)) u_k (.clk, .rst_n, .clr(start), .in_bit, .out_bit);
  end else if (VARIANT == SSRC_C) begin : g_c
    ssrc_c #(.DE_DEPTH(DE_DEPTH)) u_k (.clk, .rst_n, .clr(start), .in_bit, .out_bit);
  end else begin : g_d
    ssrc_d #(.DE_DEPTH(DE_DEPTH)) u_k (.clk, .rst_n, .clr(start), .in_bit, .out_bit);
  end

endmodule
