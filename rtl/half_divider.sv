// 1/2 divider with negative-edge operation, with hold input.
//
// A toggle flip-flop clocked on the falling edge of selector2's output. Each
// unheld falling edge inverts q, so q is the input divided by two, and its
// rising edges step the ring counter. While hold (the distributed pulse) is
// high the flip-flop keeps its state, which freezes the ring counter and so
// the phase selection: the 1+1/k divider then passes the selected phase
// clock through unchanged.
//
// Interface: clk is selector2's output (falling edge active), rst_n an
// asynchronous active-low reset to q = 0, hold sampled at the falling edge.
// The reset value is this design's choice.
`timescale 1ps/1ps
module half_divider (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  output logic q
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (!hold) q <= ~q;
  end

endmodule
