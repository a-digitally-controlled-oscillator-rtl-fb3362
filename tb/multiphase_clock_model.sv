// Behavioural model of a K-phase clock source (simulation only).
//
// Produces K clocks of period t_d = 2*K*HALF_STEP_PS picoseconds, 50% duty,
// where clk_ph[i] lags clk_ph[i-1] by t_d/K = 2*HALF_STEP_PS. Time advances
// in steps of HALF_STEP_PS; at each step exactly one phase clock changes
// (for odd K), so no two phase edges coincide. Clocks run only after
// 'enable' is set, which lets a testbench start them after its reset.
`timescale 1ps/1ps
module multiphase_clock_model #(
  parameter int unsigned K            = 7,
  parameter int unsigned HALF_STEP_PS = 10204  // t_d/(2K): 7 MHz for K = 7
) (
  input  logic         enable,
  output logic [K-1:0] clk_ph
);

  int unsigned n;

  function automatic logic [K-1:0] phases(int unsigned t);
    logic [K-1:0] p;
    for (int unsigned i = 0; i < K; i++)
      p[i] = ((t + 2 * K - 2 * i) % (2 * K)) < K;
    return p;
  endfunction

  initial begin
    n      = 2 * K - 1;
    clk_ph = phases(n);
    wait (enable);
    forever begin
      #(HALF_STEP_PS);
      n      = (n + 1) % (2 * K);
      clk_ph = phases(n);
    end
  end

endmodule
