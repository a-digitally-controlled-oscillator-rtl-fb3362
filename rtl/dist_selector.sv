// Selector and OR gate of the 1+1/k dividing-clock distribution circuit.
//
// Combines the pulses of divider-1 .. divider-Z into the distributed pulse
// that holds the 1+1/k divider. The data word is cross-connected: bit b of
// d_in (weight 2^b) enables divider-(Z-b), whose period is 2^(Z-b), so it
// gives 2^b pulses per 2^Z periods. The enabled pulses are ORed. Because
// the dividers' pulses never overlap, the distributed pulse is high in
// exactly d_in of every 2^Z periods, spread at constant intervals: for
// Z = 6 and d_in = 20 = 16 + 4, divider-2 and divider-4 are used.
//
// Interface: pulses[j-1] is divider-j's pulse, d_in the frequency control
// word, dist_pulse the distributed pulse. Combinational.
`timescale 1ps/1ps
module dist_selector #(
  parameter int unsigned Z = 6  // dividers 2^1 .. 2^Z
) (
  input  logic [Z-1:0] pulses,
  input  logic [Z-1:0] d_in,
  output logic         dist_pulse
);

  logic [Z-1:0] picked;

  // Divider-j (pulses[j-1]) is enabled by d_in[Z-j].
  always_comb begin
    for (int j = 1; j <= Z; j++)
      picked[j-1] = pulses[j-1] & d_in[Z-j];
    dist_pulse = |picked;
  end

endmodule
