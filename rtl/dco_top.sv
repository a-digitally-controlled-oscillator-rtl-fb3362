// Digitally controlled oscillator built from a 1+1/k frequency divider and
// K phase clocks.
//
// The output period is made of 2^Z periods of an internal clock mp_clk,
// each either t_d (one period of a phase clock) or t_d(1+1/k) (the 1+1/k
// divider stepping to the next, later phase). The control word d_in sets how
// many of the 2^Z periods are t_d, spread evenly over the output period:
//
//   T_out = d_in * t_d + (2^Z - d_in) * t_d (1 + 1/K)
//   f_out = f_d / ((1 + 1/K)(2^Z - d_in) + d_in)
//
// so each step of d_in shortens the output period by t_d/K.
//
// Blocks: frac_divider (the 1+1/k divider, its output is mp_clk);
// pulse_divider x Z (divide mp_clk by 2^1 .. 2^Z, pulses never overlap);
// dist_selector (picks the dividers enabled by d_in and ORs them into the
// distributed pulse that holds the 1+1/k divider); mp_counter (counts
// mp_clk); dco_comparator (makes the output and clears the counter after
// 2^Z periods). All of this follows the document. The register d_q, which
// takes a new d_in only at the start of an output period so that every
// output period uses one control word, is this design's choice.
//
// Interface: clk_ph[i] is phase clock clk_(i+1) (period t_d, each lagging
// the previous one by t_d/K, K >= 3), rst_n an asynchronous active-low
// reset, d_in the control word 0 .. 2^Z-1, dco_out the oscillator output,
// mp_clk the internal clock (brought out for observation). After reset the
// first output period runs with d_in = 0 (free-running frequency).
// Defaults K = 7, Z = 6 are the configuration the document simulates.
`timescale 1ps/1ps
module dco_top #(
  parameter int unsigned K = 7,  // number of phase clocks
  parameter int unsigned Z = 6   // dividers 2^1 .. 2^Z; 2^Z periods per output period
) (
  input  logic [K-1:0] clk_ph,
  input  logic         rst_n,
  input  logic [Z-1:0] d_in,
  output logic         dco_out,
  output logic         mp_clk
);

  logic [Z-1:0] pulses;
  logic [Z-1:0] d_q;
  logic         dist_pulse;
  logic [Z-1:0] count;
  logic         clear;

  frac_divider #(.K(K)) u_frac (
    .clk_ph (clk_ph),
    .rst_n  (rst_n),
    .hold   (dist_pulse),
    .clk_out(mp_clk)
  );

  for (genvar j = 1; j <= Z; j++) begin : g_div
    pulse_divider #(.J(j)) u_div (.clk(mp_clk), .rst_n(rst_n), .pulse(pulses[j-1]));
  end

  // Control word for the current output period.
  always_ff @(posedge mp_clk or negedge rst_n) begin
    if (!rst_n)     d_q <= '0;
    else if (clear) d_q <= d_in;
  end

  dist_selector #(.Z(Z)) u_sel (.pulses(pulses), .d_in(d_q), .dist_pulse(dist_pulse));

  mp_counter #(.Z(Z)) u_cnt (.clk(mp_clk), .rst_n(rst_n), .clear(clear), .count(count));

  dco_comparator #(.Z(Z)) u_dc (
    .clk    (mp_clk),
    .rst_n  (rst_n),
    .count  (count),
    .clear  (clear),
    .dco_out(dco_out)
  );

endmodule
