// Frequency-versus-control-word sweep of the DCO at its default size
// (K = 7 phase clocks at 7 MHz, 2^6 periods per output period).
//
// For every control word d = 0 .. 63 it measures one output period after
// the word has taken effect and checks:
//   - T_out(d) = d*t_d + (64-d)*t_d*(1+1/7)   (frequency law);
//   - T_out(d-1) - T_out(d) = t_d/7 = 20408 ps (time resolution, linearity);
//   - for even d, high time = low time (50% duty); for odd d the low half
//     is shorter by t_d/7.
// It prints the table d, T_out, f_out.
`timescale 1ps/1ps
module tb_dco_sweep;
  localparam int unsigned K  = 7;
  localparam int unsigned Z  = 6;
  localparam int unsigned H  = 10204;
  localparam longint TD      = 2 * K * H;
  localparam longint TSTEP   = 2 * H;
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
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint t0, t1, t2, prev;
    #100 rst_n = 1'b0;
    enable = 1'b1;
    #(2 * TD) rst_n = 1'b1;
    prev = -1;
    @(posedge dco_out);
    for (int unsigned d = 0; d < N; d++) begin
      d_in = Z'(d);
      @(posedge dco_out);            // word latched at the end of this period
      t0 = $time;
      @(negedge dco_out);
      t1 = $time;
      @(posedge dco_out);
      t2 = $time;
      check(t2 - t0 == longint'(d) * TD + (longint'(N) - longint'(d)) * (TD + TSTEP),
            $sformatf("d=%0d period %0d ps", d, t2 - t0));
      if (prev >= 0)
        check(prev - (t2 - t0) == TSTEP, $sformatf("d=%0d step %0d ps", d, prev - (t2 - t0)));
      check((t1 - t0) - (t2 - t1) == ((d % 2 == 1) ? TSTEP : 0),
            $sformatf("d=%0d high %0d ps low %0d ps", d, t1 - t0, t2 - t1));
      $display("d=%2d  T_out=%0d ps  f_out=%0.1f Hz", d, t2 - t0, 1.0e12 / real'(t2 - t0));
      prev = t2 - t0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(3 * N + 20) * N * (TD + TSTEP));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
