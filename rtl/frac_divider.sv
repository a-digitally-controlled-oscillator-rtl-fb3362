// 1+1/k frequency divider.
//
// Divides a phase clock of period t_d by 1+1/k by stepping, once per output
// period, from phase clock i to phase clock i+1, which lags it by t_d/k.
//
// Structure: a K-bit ring counter drives selector1 directly and selector2
// through a one-bit left rotation (ring bit K-1 feeds selector2's bit 0), so
// selector1 passes clk_(i) while selector2 passes the next phase clk_(i+1).
// A 1/2 divider toggles on every falling edge of selector2's output, and
// each rising edge of it advances the ring counter. The first falling edge
// of clk_(i+1) after a switch comes t_d/k later and only returns the 1/2
// divider to 0; the second, one t_d later, advances the ring again. So the
// ring advances every t_d + t_d/k, and since each switch happens on a
// falling edge of the newly selected clock while the old one is already low,
// selector1's output carries one full clock per t_d(1+1/k) without glitches.
//
// While hold is high the 1/2 divider and with it the ring counter stop, and
// clk_out is the selected phase clock itself (period t_d). In the DCO, hold
// changes right after a rising edge of clk_out; it then governs the falling
// edges of selector2 that lie in that clk_out period, so each clk_out period
// lasts t_d when hold is high and t_d(1+1/k) when it is low.
//
// Interface: clk_ph[i] is phase clock clk_(i+1), each lagging clk_ph[i-1] by
// t_d/K; K >= 3 so that t_d/K is shorter than half a period. rst_n is an
// asynchronous active-low reset (clk_1 selected, 1/2 divider at 0). clk_out
// is selector1's output. Structure and connections follow the document;
// reset values are this design's choices.
`timescale 1ps/1ps
module frac_divider #(
  parameter int unsigned K = 7  // number of phase clocks
) (
  input  logic [K-1:0] clk_ph,
  input  logic         rst_n,
  input  logic         hold,
  output logic         clk_out
);

  logic [K-1:0] ring;
  logic [K-1:0] sel2;
  logic         sel2_clk;
  logic         half_q;

  always_comb sel2 = {ring[K-2:0], ring[K-1]};

  phase_selector #(.K(K)) u_selector1 (.clk_ph(clk_ph), .sel(ring), .clk_out(clk_out));
  phase_selector #(.K(K)) u_selector2 (.clk_ph(clk_ph), .sel(sel2), .clk_out(sel2_clk));

  half_divider u_half (.clk(sel2_clk), .rst_n(rst_n), .hold(hold), .q(half_q));

  ring_counter #(.K(K)) u_ring (.clk(half_q), .rst_n(rst_n), .ring(ring));

endmodule
