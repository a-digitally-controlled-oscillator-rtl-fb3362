// Testbench of dco_comparator (Z = 6) driven by a counter modulo 64: clear
// must be high exactly at count 63, and the output must be high during
// counts 0..31 and low during 32..63 (it changes on the edge after 31 and
// after 63), so it has a period of 64 clocks and a duty ratio of 50%.
`timescale 1ps/1ps
module tb_dco_comparator;
  localparam int unsigned Z = 6;
  logic clk;
  logic rst_n = 1'b1;
  logic [Z-1:0] count;
  logic clear, dco_out;
  int checks = 0, failures = 0, highs = 0;

  dco_comparator #(.Z(Z)) dut (.clk(clk), .rst_n(rst_n), .count(count), .clear(clear),
                               .dco_out(dco_out));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;

  initial begin
    #2 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    repeat (3 * 64) begin
      checks++;
      if (clear != (count == 63) || dco_out != (count < 32)) begin
        failures++;
        $display("FAIL count=%0d clear=%b dco_out=%b", count, clear, dco_out);
      end
      if (dco_out) highs++;
      @(negedge clk);
    end
    checks++;
    if (highs != 3 * 32) begin failures++; $display("FAIL duty: %0d high", highs); end
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
