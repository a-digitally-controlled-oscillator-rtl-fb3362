// Divider-j of the 1+1/k dividing-clock distribution circuit (divide by 2^J).
//
// A J-bit counter of the output clock of the 1+1/k divider. It raises pulse
// for one input period out of every 2^J, namely when its count is 2^(J-1).
// All dividers start from 0 together, so divider-J's pulse falls in the
// periods whose number n satisfies n mod 2^J = 2^(J-1). Those sets are
// disjoint for different J: the dividers are started offset by one input
// period from each other and their pulses never overlap, and the pulses of
// one divider are equally spaced.
//
// Interface: clk is the 1+1/k divider's output (rising edge), rst_n an
// asynchronous active-low reset to count 0, pulse is high for the whole
// period in which it is selected. The document gives the division ratio
// and the non-overlapping offset; the counter and comparator form and the
// offset value 2^(J-1) are this design's.
`timescale 1ps/1ps
module pulse_divider #(
  parameter int unsigned J = 1  // divides by 2^J
) (
  input  logic clk,
  input  logic rst_n,
  output logic pulse
);

  logic [J-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb pulse = (cnt == J'(2 ** (J - 1)));

endmodule
