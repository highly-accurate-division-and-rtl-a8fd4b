// contrast_stretch: stochastic contrast stretching f(x) = (x-m)/(n-m).
//
// One LFSR is shared by three comparators for the pixel value x and the
// bounds m and n, so the three streams X, M, N are maximally correlated.
// NOT M is ANDed with X and with N: for correlated streams X AND NOT M
// carries max(x-m, 0) and N AND NOT M carries n-m. These two streams feed the
// proposed divider (sc_divider), which returns the smaller over the larger:
// (x-m)/(n-m) for m <= x <= n and 0 for x < m. For x > n it returns
// (n-m)/(x-m) rather than the ideal 1, a property of this structure.
//
// Timing: as sc_div_circuit. Pulse `start` with `seed`, `x`, `m`, `n` valid
// (held stable afterwards); `f` in the cycle after each input bit is the
// output bit for it.
module contrast_stretch
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
  input  logic [N-1:0] m,
  input  logic [N-1:0] n,
  output logic         f
);

  logic [N-1:0] rnd;
  logic         x_bit, m_bit, n_bit;
  logic         num_bit;  // x - m
  logic         den_bit;  // n - m

  lfsr_rng #(.N(N)) u_rng (
    .clk, .rst_n,
    .load (start),
    .seed,
    .rnd
  );

  sng_cmp #(.N(N)) u_cmp_x (.rnd, .x(x), .bit_o(x_bit));
  sng_cmp #(.N(N)) u_cmp_m (.rnd, .x(m), .bit_o(m_bit));
  sng_cmp #(.N(N)) u_cmp_n (.rnd, .x(n), .bit_o(n_bit));

  always_comb begin
    num_bit = x_bit & ~m_bit;
    den_bit = n_bit & ~m_bit;
  end

  sc_divider #(.DE_DEPTH(DE_DEPTH)) u_div (
    .clk, .rst_n,
    .clr   (start),
    .x_bit (num_bit),
    .y_bit (den_bit),
    .z     (f)
  );

endmodule
