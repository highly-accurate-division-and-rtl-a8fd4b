// sng_cmp: comparator (CMP) of a stochastic number generator.
//
// Emits 1 when the random number `rnd` is not above the binary input `x`.
// With `rnd` taking every value 1..2^N-1 once per LFSR period, the stream
// holds exactly x ones in 2^N-1 bits, so it encodes x/(2^N-1): 0 gives an
// all-zero stream and 2^N-1 an all-one stream. Comparators that share one
// `rnd` produce maximally correlated streams (the ones of the smaller value
// are a subset of the ones of the larger). The comparison sense (rnd <= x,
// matched to an RNG that never outputs 0) is this design's choice. Purely
// combinational.
module sng_cmp
  import sc_pkg::*;
#(
  parameter int unsigned N = SC_N
) (
  input  logic [N-1:0] rnd,
  input  logic [N-1:0] x,
  output logic         bit_o
);

  always_comb bit_o = (rnd <= x);

endmodule
