// lfsr_rng: random number generator (RNG) of a stochastic number generator.
//
// An N-bit Fibonacci linear feedback shift register. Each cycle the register
// shifts one place toward the MSB and the XOR of the tapped stages enters at
// the LSB. With a maximal-length tap set it walks through every non-zero
// N-bit value once in 2^N-1 cycles, so an SNG built on it emits a
// (2^N-1)-bit stream, 255 bits for the default N=8. The tap set
// (x^8+x^6+x^5+x^4+1 for N=8, from sc_pkg::lfsr_taps) is this design's
// choice.
//
// Interface: `load` (synchronous) copies `seed` into the register; an
// all-zero seed, which would lock the LFSR, is replaced by 1. Without `load`
// the register advances every clock. `rnd` is the register itself, valid in
// the cycle after `load` (it then equals the seed). Reset sets the register
// to 1.
module lfsr_rng
  import sc_pkg::*;
#(
  parameter int unsigned    N    = SC_N,
  parameter logic [N-1:0]   TAPS = N'(lfsr_taps(N))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] rnd
);

  logic [N-1:0] state;
  logic         feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= N'(1);
    end else if (load) begin
      state <= (seed == '0) ? N'(1) : seed;
    end else begin
      state <= {state[N-2:0], feedback};
    end
  end

  assign rnd = state;

  // The all-zero state is a lock-up state and must never be reached.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
