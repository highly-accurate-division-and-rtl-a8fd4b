// jk_ff: JK flip-flop.
//
// On each clock: J=1,K=0 sets Q; J=0,K=1 clears Q; J=K=1 toggles Q; J=K=0
// holds Q. Fed with stochastic streams J and K that never (or rarely) are 1
// together, Q is 1 a fraction J/(J+K) of the time, which is how the divider
// and SSRC-A kernels use it. Reset (asynchronous, active low) and the
// synchronous `clr` load INIT, the bit the flip-flop presents before the
// first stream bit; INIT = 0 is this design's choice.
module jk_ff #(
  parameter logic INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= INIT;
    end else if (clr) begin
      q <= INIT;
    end else begin
      q <= (j & ~q) | (~k & q);
    end
  end

endmodule
