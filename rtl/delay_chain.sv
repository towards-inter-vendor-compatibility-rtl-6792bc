// delay_chain: BEHAVIOURAL MODEL (not synthesizable) of the carry-chain
// tapped delay line used for time-to-digital conversion.
//
// On the FPGA the chain is the carry path of an adder placed by hand in
// consecutive LABs (16 stages in one Cyclone IV LAB, 60 stages in three
// Cyclone V LABs); each stage output feeds a flip-flop. The model is a chain
// of M_STAGES inertial delays: tap[j] is din delayed by
// STEP_PS[0] + ... + STEP_PS[j]. The time span of one stage is a "bin"; bins
// of a real chain are far from uniform, which is why STEP_PS is a per-stage
// array. Its default is the uniform average bin width d_step of the Cyclone V
// chain (7.5 ps); a testbench may pass measured or random widths.
//
// Ports: din (ring-oscillator stage output), tap[M_STAGES] (stage outputs).
module delay_chain #(
  parameter int unsigned M_STAGES = 60,
  parameter real         STEP_PS [M_STAGES] = '{default: 7.5}
) (
  input  logic                din,
  output logic [M_STAGES-1:0] tap
);
  timeunit 1ps; timeprecision 10fs;

  assign #(STEP_PS[0]) tap[0] = din;
  for (genvar j = 1; j < M_STAGES; j++) begin : g_step
    assign #(STEP_PS[j]) tap[j] = tap[j-1];
  end
endmodule
