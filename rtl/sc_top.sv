// sc_top: the stochastic division and square root designs side by side.
//
// Holds, each with its own stochastic number generator and its own ports:
//   - the correlation-based divider (MIN(x,y)/MAX(x,y)), 2-flip-flop DE;
//   - the four square-root circuits SSRC-A, -B, -C, -D, each at the
//     smallest delay-element depth it supports (0, 1, 1, 1);
//   - the contrast-stretching circuit built on the divider.
// All inputs are N-bit binary values v standing for v/(2^N-1); all outputs
// are bitstreams whose fraction of ones over 2^N-1 cycles is the result.
//
// Timing: pulse `start` for one cycle with seeds and operands valid and keep
// the operands stable for the next 2^N-1 cycles. The square-root outputs
// are valid in cycles 1..2^N-1 after `start`; the divider and contrast
// stretching outputs, which leave through a flip-flop, one cycle later
// (cycles 2..2^N). A new `start` may follow at any time and restarts all
// streams.
module sc_top
  import sc_pkg::*;
#(
  parameter int unsigned N         = SC_N,
  parameter int unsigned DIV_DE    = 2,
  parameter int unsigned SSRC_A_DE = 0,
  parameter int unsigned SSRC_B_DE = 1,
  parameter int unsigned SSRC_C_DE = 1,
  parameter int unsigned SSRC_D_DE = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N-1:0]       seed_div,
  input  logic [3:0][N-1:0]  seed_sqrt,
  input  logic [N-1:0]       seed_cs,
  input  logic [N-1:0]       div_x,
  input  logic [N-1:0]       div_y,
  input  logic [3:0][N-1:0]  sqrt_in,
  input  logic [N-1:0]       cs_x,
  input  logic [N-1:0]       cs_m,
  input  logic [N-1:0]       cs_n,
  output logic               div_z,
  output logic [3:0]         sqrt_out,
  output logic               cs_f
);

  sc_div_circuit #(.N(N), .DE_DEPTH(DIV_DE)) u_div (
    .clk, .rst_n, .start,
    .seed (seed_div),
    .x    (div_x),
    .y    (div_y),
    .z    (div_z)
  );

  sc_sqrt_circuit #(.N(N), .VARIANT(SSRC_A), .DE_DEPTH(SSRC_A_DE)) u_sqrt_a (
    .clk, .rst_n, .start,
    .seed (seed_sqrt[0]), .in_val (sqrt_in[0]), .out_bit (sqrt_out[0])
  );

  sc_sqrt_circuit #(.N(N), .VARIANT(SSRC_B), .DE_DEPTH(SSRC_B_DE)) u_sqrt_b (
    .clk, .rst_n, .start,
    .seed (seed_sqrt[1]), .in_val (sqrt_in[1]), .out_bit (sqrt_out[1])
  );

  sc_sqrt_circuit #(.N(N), .VARIANT(SSRC_C), .DE_DEPTH(SSRC_C_DE)) u_sqrt_c (
    .clk, .rst_n, .start,
    .seed (seed_sqrt[2]), .in_val (sqrt_in[2]), .out_bit (sqrt_out[2])
  );

  sc_sqrt_circuit #(.N(N), .VARIANT(SSRC_D), .DE_DEPTH(SSRC_D_DE)) u_sqrt_d (
    .clk, .rst_n, .start,
    .seed (seed_sqrt[3]), .in_val (sqrt_in[3]), .out_bit (sqrt_out[3])
  );

  contrast_stretch #(.N(N), .DE_DEPTH(DIV_DE)) u_cs (
    .clk, .rst_n, .start,
    .seed (seed_cs),
    .x    (cs_x),
    .m    (cs_m),
    .n    (cs_n),
    .f    (cs_f)
  );

endmodule
