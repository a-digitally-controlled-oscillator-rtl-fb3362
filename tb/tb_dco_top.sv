// End-to-end testbench of the DCO at its default size (K = 7 phase clocks at
// 7 MHz, 2^6 counted periods per output period).
//
// For a list of control words, including the document's operating points
// 20 and 40 and a 10 <-> 40 step sequence, it measures on the output:
//   - the period, against d*t_d + (64-d)*t_d*(1+1/7) in picoseconds;
//   - the high time, against a slot model: counted period n (n = 1..63) is
//     a held (t_d) period when bit Z-(1+trailing zeros of n) of d is set;
//   - the internal clock: every mp_clk period must be t_d or t_d(1+1/K),
//     with exactly d periods of t_d per output period.
// It counts each mechanism: held (pass-through) periods, divided periods,
// phase steps of the ring counter, control-word changes and output-period
// wraps, and fails if any never happens.
`timescale 1ps/1ps
module tb_dco_top;
  localparam int unsigned K  = 7;
  localparam int unsigned Z  = 6;
  localparam int unsigned H  = 10204;          // t_d / (2K) in ps
  localparam longint TD      = 2 * K * H;      // t_d
  localparam longint TSTEP   = 2 * H;          // t_d / K
  localparam int unsigned N  = 2 ** Z;

  logic         enable = 1'b0;
  logic [K-1:0] clk_ph;
  logic         rst_n  = 1'b1;
  logic [Z-1:0] d_in   = '0;
  logic         dco_out, mp_clk;

  int checks = 0, failures = 0;

  multiphase_clock_model #(.K(K), .HALF_STEP_PS(H)) u_clk (.enable(enable), .clk_ph(clk_ph));
  dco_top dut (.clk_ph(clk_ph), .rst_n(rst_n), .d_in(d_in), .dco_out(dco_out), .mp_clk(mp_clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Independent model of the distribution: which counted periods are held.
  function automatic bit held(int unsigned n, logic [Z-1:0] d);
    int unsigned tz = 0;
    if (n == 0) return 1'b0;
    while (((n >> tz) & 1) == 0) tz++;
    return d[Z - 1 - tz];
  endfunction

  function automatic longint exp_period(logic [Z-1:0] d);
    return longint'(d) * TD + (longint'(N) - longint'(d)) * (TD + TSTEP);
  endfunction

  function automatic longint exp_high(logic [Z-1:0] d);
    longint t = 0;
    for (int unsigned n = 0; n < N / 2; n++) t += held(n, d) ? TD : TD + TSTEP;
    return t;
  endfunction

  // ---- mp_clk period classification and mechanism counters ----
  longint t_mp_prev = -1;
  int n_short = 0, n_long = 0, n_other = 0;       // within the current output period
  int cnt_held = 0, cnt_div = 0, cnt_steps = 0, cnt_wraps = 0, cnt_dchg = 0;
  logic [K-1:0] ring_prev;

  always @(posedge mp_clk) begin
    longint t;
    t = $time;
    if (t_mp_prev >= 0) begin
      if (t - t_mp_prev == TD) begin n_short++; cnt_held++; end
      else if (t - t_mp_prev == TD + TSTEP) begin n_long++; cnt_div++; end
      else n_other++;
    end
    t_mp_prev = t;
  end

  always @(dut.u_frac.ring) cnt_steps++;
  always @(dut.d_q) cnt_dchg++;

  // Output edges
  longint t_rise = -1, t_fall = -1;
  event   period_done;
  longint last_period, last_high;
  int     last_short, last_long, last_other;

  always @(posedge dco_out) begin
    longint t;
    t = $time;
    cnt_wraps++;
    if (t_rise >= 0) begin
      last_period = t - t_rise;
      last_high   = t_fall - t_rise;
      last_short  = n_short;
      last_long   = n_long;
      last_other  = n_other;
      -> period_done;
    end
    n_short = 0; n_long = 0; n_other = 0;
    t_rise = t;
  end
  always @(negedge dco_out) t_fall = $time;

  task automatic run_word(input logic [Z-1:0] d, input int periods);
    d_in = d;
    @(period_done);           // period during which d is latched
    repeat (periods) begin
      @(period_done);
      check(last_period == exp_period(d),
            $sformatf("d=%0d period %0d ps, expected %0d", d, last_period, exp_period(d)));
      check(last_high == exp_high(d),
            $sformatf("d=%0d high time %0d ps, expected %0d", d, last_high, exp_high(d)));
      check(last_short == int'(d) && last_long == (int'(N) - int'(d)) && last_other == 0,
            $sformatf("d=%0d mp_clk periods: %0d of t_d, %0d of t_d(1+1/k), %0d other",
                      d, last_short, last_long, last_other));
    end
    $display("d=%2d  T_out=%0d ps  f_out=%0.1f Hz  high=%0d ps", d, last_period,
             1.0e12 / real'(last_period), last_high);
  endtask

  initial begin
    #100 rst_n = 1'b0;
    enable = 1'b1;
    #(3 * TD + 1234);
    rst_n = 1'b1;
    @(posedge dco_out);
    // Free-running frequency right after reset (d_in = 0 until latched).
    run_word(6'd0, 2);
    run_word(6'd1, 2);
    run_word(6'd20, 2);
    run_word(6'd40, 2);
    run_word(6'd63, 2);
    run_word(6'd32, 1);
    run_word(6'd5, 1);
    // Step response between 10 and 40.
    repeat (2) begin
      run_word(6'd10, 1);
      run_word(6'd40, 1);
    end
    check(cnt_held > 0,  "no held (pass-through) mp_clk period seen");
    check(cnt_div > 0,   "no divided mp_clk period seen");
    check(cnt_steps > 0, "ring counter never stepped");
    check(cnt_dchg > 1,  "control word never changed");
    check(cnt_wraps > 0, "output period never completed");
    $display("mechanisms: held=%0d divided=%0d phase_steps=%0d word_changes=%0d periods=%0d",
             cnt_held, cnt_div, cnt_steps, cnt_dchg, cnt_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: far more than the ~25 output periods the test needs.
  initial begin
    #(longint'(200) * N * (TD + TSTEP));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
