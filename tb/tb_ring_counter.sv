// Testbench of ring_counter: after reset bit 0 is set; each rising clock
// edge moves the single 1 up by one place, wrapping from bit K-1 to bit 0.
// Checked over three full turns against a counter modulo K, plus a reset
// in mid-run.
`timescale 1ps/1ps
module tb_ring_counter;
  localparam int unsigned K = 7;
  logic clk;
  logic rst_n = 1'b1;
  logic [K-1:0] ring;
  int checks = 0, failures = 0;
  int unsigned pos;

  ring_counter #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .ring(ring));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check_pos(input int unsigned p);
    checks++;
    if (ring != (K'(1) << p)) begin
      failures++;
      $display("FAIL ring=%b expected bit %0d", ring, p);
    end
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #1 check_pos(0);
    @(negedge clk) rst_n = 1'b1;
    pos = 0;
    repeat (3 * K + 2) begin
      @(negedge clk);
      pos = (pos + 1) % K;
      check_pos(pos);
    end
    #1 rst_n = 1'b0;
    #1 check_pos(0);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) check_pos(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
