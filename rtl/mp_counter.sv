// mp-counter: counts the periods of the 1+1/k divider's output.
//
// A Z-bit up-counter clocked by every rising edge of the 1+1/k divider's
// output, whether that period was divided (t_d(1+1/k)) or passed through
// (t_d). The digital comparator clears it when one DCO output period of
// 2^Z counted periods is complete.
//
// Interface: clk rising edge, rst_n asynchronous active-low reset to 0,
// clear synchronous (next count 0), count the current count.
`timescale 1ps/1ps
module mp_counter #(
  parameter int unsigned Z = 6  // one DCO period = 2^Z counted periods
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  output logic [Z-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else            count <= count + 1'b1;
  end

endmodule
