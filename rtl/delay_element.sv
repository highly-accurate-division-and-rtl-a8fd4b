// delay_element: the delay element (DE) used to decorrelate a bitstream.
//
// A chain of DEPTH D flip-flops: `q` is `d` delayed by DEPTH clock cycles.
// Delaying one of two correlated streams makes them nearly independent,
// which the OR/AND/MUX/JKFF arithmetic of the SC kernels relies on.
// DEPTH = 0 is allowed and makes the element a plain wire. All stages reset
// to 0 asynchronously and clear to 0 synchronously on `clr`; those values
// supply the first feedback bits of a fresh stream (this reset value is this
// design's choice).
module delay_element #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic d,
  output logic q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [DEPTH-1:0] stage;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        stage <= '0;
      end else if (clr) begin
        stage <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
