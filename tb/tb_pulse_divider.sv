// Testbench of pulse_divider for J = 1, 3 and 6 side by side. After reset,
// during input period n (n = 0, 1, ...) divider-J must pulse exactly when
// n mod 2^J = 2^(J-1); the three must never pulse in the same period.
`timescale 1ps/1ps
module tb_pulse_divider;
  logic clk;
  logic rst_n = 1'b1;
  logic p1, p3, p6;
  int checks = 0, failures = 0, n_p6 = 0;

  pulse_divider #(.J(1)) d1 (.clk(clk), .rst_n(rst_n), .pulse(p1));
  pulse_divider #(.J(3)) d3 (.clk(clk), .rst_n(rst_n), .pulse(p3));
  pulse_divider #(.J(6)) d6 (.clk(clk), .rst_n(rst_n), .pulse(p6));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int unsigned n = 0; n < 200; n++) begin
      check(p1 == (n % 2 == 1),  $sformatf("n=%0d divider-1 pulse %b", n, p1));
      check(p3 == (n % 8 == 4),  $sformatf("n=%0d divider-3 pulse %b", n, p3));
      check(p6 == (n % 64 == 32), $sformatf("n=%0d divider-6 pulse %b", n, p6));
      check(int'(p1) + int'(p3) + int'(p6) <= 1, "pulses overlap");
      if (p6) n_p6++;
      @(negedge clk);
    end
    check(n_p6 == 3, "divider-6 pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
