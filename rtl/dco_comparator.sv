// Digital comparators (DC) that form the DCO output from the mp-counter.
//
// Two equality comparators on the mp-counter value. When the count reaches
// 2^(Z-1)-1 the output goes low for the second half of the output period;
// when it reaches 2^Z-1 the output goes high again, the mp-counter is
// cleared and a new output period of 2^Z counted periods begins. The output
// is high for counts 0 .. 2^(Z-1)-1 and low for the rest. Because the
// distribution circuit spreads the divided periods evenly, both halves
// contain the same number of them, so the duty ratio is 50% (exactly when
// d_in is even; for odd d_in the one pulse of divider-Z falls in the low
// half, which makes it t_d/k shorter than the high half).
//
// Interface: clk is the 1+1/k divider's output, count the mp-counter value,
// rst_n asynchronous active-low reset to dco_out = 1. clear is high
// during the last counted period of each output period.
// The document names the comparators and the count of 2^Z; the half-period
// comparator and the reset value are this design's.
`timescale 1ps/1ps
module dco_comparator #(
  parameter int unsigned Z = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Z-1:0] count,
  output logic         clear,
  output logic         dco_out
);

  logic at_half, at_full;

  always_comb begin
    at_half = (count == Z'(2 ** (Z - 1) - 1));
    at_full = (count == Z'(2 ** Z - 1));
    clear   = at_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       dco_out <= 1'b1;
    else if (at_full) dco_out <= 1'b1;
    else if (at_half) dco_out <= 1'b0;
  end

endmodule
