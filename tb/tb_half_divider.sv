// Testbench of half_divider: q toggles on every falling clock edge at which
// hold is low and keeps its value when hold is high. Random hold pattern,
// compared with a reference toggle model; also checks that with hold low q
// has twice the input period.
`timescale 1ps/1ps
module tb_half_divider;
  logic clk;
  logic rst_n = 1'b1, hold = 1'b0, q;
  logic model_q;
  int checks = 0, failures = 0, toggles = 0, holds = 0;

  half_divider dut (.clk(clk), .rst_n(rst_n), .hold(hold), .q(q));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #2 rst_n = 1'b0;
    model_q = 1'b0;
    #1 rst_n = 1'b1;
    repeat (200) begin
      @(posedge clk) hold = ($urandom_range(2) == 0);
      @(negedge clk);
      if (!hold) begin model_q = ~model_q; toggles++; end
      else holds++;
      #1;
      checks++;
      if (q !== model_q) begin
        failures++;
        $display("FAIL hold=%b q=%b expected %b", hold, q, model_q);
      end
    end
    // free running: q period = 2 input periods (20 time units)
    @(posedge clk) hold = 1'b0;
    @(posedge q);
    begin
      longint t0;
      t0 = $time;
      @(posedge q);
      checks++;
      if ($time - t0 != 20) begin
        failures++;
        $display("FAIL q period %0d", $time - t0);
      end
    end
    if (toggles == 0 || holds == 0) failures++;
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
