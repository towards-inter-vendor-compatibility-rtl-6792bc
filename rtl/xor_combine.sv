// xor_combine: combines the captured states of the N parallel delay chains.
//
// Bit j of the result is the XOR of the flip-flops at stage j of all chains,
// c[j] = q[0][j] ^ q[1][j] ^ ... ^ q[N-1][j]. Because the ring-oscillator
// edge travels down only one chain at a time inside the sampled window, the
// XOR turns the N thermometer codes into one vector with a single
// transition at the position of the jittery edge (C0 .. Cm-1 of the
// published design). Purely combinational. The XOR folding follows the
// published design.
module xor_combine #(
  parameter int unsigned N_CHAINS = 3,
  parameter int unsigned M_STAGES = 60
) (
  input  logic [N_CHAINS-1:0][M_STAGES-1:0] q,
  output logic [M_STAGES-1:0]               c
);
  timeunit 1ps; timeprecision 10fs;

  always_comb begin
    c = '0;
    for (int i = 0; i < N_CHAINS; i++) c ^= q[i];
  end
endmodule
