// Ring counter of the 1+1/k frequency divider.
//
// A K-bit one-hot register whose single 1 moves one place towards the most
// significant bit on every rising edge of clk, wrapping from bit K-1 back to
// bit 0. Bit i set means "phase clock i is the one in use"; the register is
// the selection signal of both phase selectors. K equals the number of phase
// clocks, as the divider's description requires.
//
// Interface: clk is the output of the 1/2 divider, rst_n an asynchronous
// active-low reset that loads bit 0 (phase clock clk_1 selected). One update
// per rising clk edge, visible immediately after it.
// The reset value and the asynchronous reset are choices of this design.
`timescale 1ps/1ps
module ring_counter #(
  parameter int unsigned K = 7  // number of phase clocks
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [K-1:0] ring
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ring <= K'(1);
    else        ring <= {ring[K-2:0], ring[K-1]};
  end

  // Exactly one phase is selected at any time.
  a_onehot: assert property (@(posedge clk) $onehot(ring));

endmodule
