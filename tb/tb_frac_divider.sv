// Testbench of frac_divider, the 1+1/k divider, with K = 7 phase clocks of
// t_d = 142856 ps. hold is changed right after each rising edge of the
// output, as the distribution circuit does, with a random pattern. Each
// output period must then be t_d (hold high: phase clock passed through) or
// t_d + t_d/K (hold low: divided by 1+1/k), and the selected phase must
// advance by one exactly in the divided periods. Also checks a run of
// divided periods against the frequency f_d/(1+1/k).
`timescale 1ps/1ps
module tb_frac_divider;
  localparam int unsigned K = 7;
  localparam int unsigned H = 10204;
  localparam longint TD    = 2 * K * H;
  localparam longint TSTEP = 2 * H;

  logic enable = 1'b0, rst_n = 1'b1, hold = 1'b0;
  logic [K-1:0] clk_ph;
  logic clk_out;
  int checks = 0, failures = 0, n_div = 0, n_held = 0;

  multiphase_clock_model #(.K(K), .HALF_STEP_PS(H)) u_clk (.enable(enable), .clk_ph(clk_ph));
  frac_divider #(.K(K)) dut (.clk_ph(clk_ph), .rst_n(rst_n), .hold(hold), .clk_out(clk_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic   h;
    longint t0, t1;
    logic [K-1:0] r0;
    #100 rst_n = 1'b0;
    enable = 1'b1;
    #(2 * TD) rst_n = 1'b1;
    @(posedge clk_out);
    @(posedge clk_out);
    repeat (300) begin
      h    = ($urandom_range(2) == 0);
      hold = h;
      t0   = $time;
      r0   = dut.ring;
      @(posedge clk_out);
      t1 = $time;
      if (h) begin
        n_held++;
        check(t1 - t0 == TD, $sformatf("held period %0d ps, expected %0d", t1 - t0, TD));
        check(dut.ring == r0, "phase changed during a held period");
      end else begin
        n_div++;
        check(t1 - t0 == TD + TSTEP,
              $sformatf("divided period %0d ps, expected %0d", t1 - t0, TD + TSTEP));
        check(dut.ring == {r0[K-2:0], r0[K-1]}, "phase did not advance by one");
      end
    end
    // 2K divided periods in a row: f_d/(1+1/k) on average, exactly 2K*t_d*(1+1/K)
    hold = 1'b0;
    t0 = $time;
    repeat (2 * K) @(posedge clk_out);
    check($time - t0 == 2 * K * (TD + TSTEP), "2K divided periods");
    check(n_div > 0 && n_held > 0, "both period kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(1000) * TD);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
