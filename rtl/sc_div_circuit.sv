// sc_div_circuit: complete stochastic division circuit, SNG plus kernel.
//
// One LFSR is shared by the two comparators that turn the binary inputs x
// and y into the streams X and Y; sharing the random number makes X and Y
// maximally correlated, which the sc_divider kernel needs. The output stream
// z encodes MIN(x,y)/MAX(x,y), so neither input has to be marked as the
// divisor.
//
// Timing: pulse `start` for one cycle with `seed`, `x` and `y` valid (x and y
// must then stay stable). The LFSR loads the seed and the kernel state is
// cleared at that clock edge; the next 2^N-1 cycles carry the input stream
// bits, and `z` in the cycle after each input bit is the output bit for it
// (count ones of `z` over cycles 2..2^N after `start`). The caller counts the
// ones; this block has no counter.
module sc_div_circuit
  import sc_pkg::*;
#(
  parameter int unsigned N        = SC_N,
  parameter int unsigned DE_DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] seed,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         z
);

  logic [N-1:0] rnd;
  logic         x_bit, y_bit;

  lfsr_rng #(.N(N)) u_rng (
    .clk, .rst_n,
    .load (start),
    .seed,
    .rnd
  );

  sng_cmp #(.N(N)) u_cmp_x (.rnd, .x(x), .bit_o(x_bit));
  sng_cmp #(.N(N)) u_cmp_y (.rnd, .x(y), .bit_o(y_bit));

  sc_divider #(.DE_DEPTH(DE_DEPTH)) u_div (
    .clk, .rst_n,
    .clr   (start),
    .x_bit,
    .y_bit,
    .z
  );

endmodule
