// Testbench of phase_selector: random phase-clock levels and a random
// one-hot selection; the output must equal the selected input.
`timescale 1ps/1ps
module tb_phase_selector;
  localparam int unsigned K = 7;
  logic [K-1:0] clk_ph, sel;
  logic clk_out;
  int checks = 0, failures = 0;
  int unsigned idx;

  phase_selector #(.K(K)) dut (.clk_ph(clk_ph), .sel(sel), .clk_out(clk_out));

  initial begin
    repeat (500) begin
      idx    = $urandom_range(K - 1);
      clk_ph = K'($urandom);
      sel    = K'(1) << idx;
      #1;
      checks++;
      if (clk_out !== clk_ph[idx]) begin
        failures++;
        $display("FAIL clk_ph=%b sel=%b out=%b", clk_ph, sel, clk_out);
      end
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
