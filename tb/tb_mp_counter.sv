// Testbench of mp_counter: counts rising edges modulo 2^Z and returns to 0
// after a cycle with clear high. Random clear pattern against a model.
`timescale 1ps/1ps
module tb_mp_counter;
  localparam int unsigned Z = 6;
  logic clk;
  logic rst_n = 1'b1, clear = 1'b0;
  logic [Z-1:0] count;
  int unsigned model;
  int checks = 0, failures = 0, n_clear = 0, n_wrap = 0;

  mp_counter #(.Z(Z)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .count(count));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #2 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    model = 0;
    repeat (400) begin
      clear = ($urandom_range(40) == 0);
      @(posedge clk);
      if (clear) begin model = 0; n_clear++; end
      else begin
        model = (model + 1) % (2 ** Z);
        if (model == 0) n_wrap++;
      end
      @(negedge clk);
      checks++;
      if (count != Z'(model)) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, model);
      end
    end
    if (n_clear == 0 || n_wrap == 0) failures++;
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
