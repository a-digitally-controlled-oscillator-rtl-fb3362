// Testbench of dist_selector (Z = 6). Random divider pulses and control
// words against the reference "OR of pulses & bit-reversed d_in" (divider-j
// is enabled by d_in bit Z-j), plus the document's example d_in = 20, which
// must use divider-2 and divider-4 only, and d_in = 40, which must use
// divider-1 and divider-3 only; and, with Z = 4, d_in = 6, which must use
// divider-2 and divider-3 only.
`timescale 1ps/1ps
module tb_dist_selector;
  localparam int unsigned Z = 6;
  logic [Z-1:0] pulses, d_in, rev;
  logic dist_pulse;
  int checks = 0, failures = 0;

  dist_selector #(.Z(Z)) dut (.pulses(pulses), .d_in(d_in), .dist_pulse(dist_pulse));

  // Z = 4 instance for the 2^4 example: d_in = 6 = 4 + 2 uses divider-2 and divider-3.
  logic [3:0] p4;
  logic       dist4;
  dist_selector #(.Z(4)) dut4 (.pulses(p4), .d_in(4'd6), .dist_pulse(dist4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic uses(input int unsigned d, input logic [Z-1:0] used);
    d_in = Z'(d);
    for (int unsigned j = 1; j <= Z; j++) begin
      pulses = Z'(1) << (j - 1);
      #1 check(dist_pulse == used[j-1],
               $sformatf("d_in=%0d divider-%0d gives %b", d, j, dist_pulse));
    end
  endtask

  initial begin
    repeat (500) begin
      pulses = Z'($urandom);
      d_in   = Z'($urandom);
      rev    = {<<{d_in}};
      #1 check(dist_pulse == |(pulses & rev), $sformatf("pulses=%b d_in=%b", pulses, d_in));
    end
    uses(20, 6'b001010);  // divider-2 and divider-4
    uses(40, 6'b000101);  // divider-1 and divider-3
    uses(6,  6'b011000);  // Z=6: 4 -> divider-4, 2 -> divider-5
    uses(0,  6'b000000);
    for (int unsigned j = 1; j <= 4; j++) begin
      p4 = 4'(1) << (j - 1);
      #1 check(dist4 == (j == 2 || j == 3), $sformatf("Z=4 d_in=6 divider-%0d gives %b", j, dist4));
    end
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
