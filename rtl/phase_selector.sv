// Phase selector (selector1 / selector2 of the 1+1/k frequency divider).
//
// Passes one of K phase clocks to its output. The selection is one-hot, as
// produced by the ring counter, so the selector is an AND-OR tree: bit i of
// sel gates phase clock i. This is purely combinational; the output follows
// the selected clock with gate delay only. The divider switches the
// selection only at moments when the old and the new clock are at the same
// level (see frac_divider), so the switch makes no pulse of its own.
//
// Interface: clk_ph[i] is phase clock clk_(i+1), sel is one-hot, clk_out the
// selected clock. The AND-OR form is this design's choice; the document only
// names the two selectors.
`timescale 1ps/1ps
module phase_selector #(
  parameter int unsigned K = 7  // number of phase clocks
) (
  input  logic [K-1:0] clk_ph,
  input  logic [K-1:0] sel,
  output logic         clk_out
);

  always_comb clk_out = |(clk_ph & sel);

endmodule
