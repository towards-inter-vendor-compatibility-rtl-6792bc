// ring_oscillator: BEHAVIOURAL MODEL (not synthesizable) of the LUT ring
// oscillator that is the entropy source of the delay-chain TRNG.
//
// On the FPGA this is N_STAGES LUTs in a loop, placed and routed by hand.
// Stage 0 is gated by ena: while ena is low every stage output rests at 1;
// when ena rises the ring starts to oscillate. In the model stage 0 computes
// ~(ena & stage_out[N_STAGES-1]) and the other stages copy their predecessor,
// so the loop has one inversion and oscillates with a period of
// 2 * N_STAGES * D_RO_STAGE_PS. Choosing which stage inverts is this model's
// own choice; the published design states only that the ring is made of LUTs and is
// enabled by ENA.
//
// Each stage transition is delayed by D_RO_STAGE_PS plus Gaussian jitter of
// standard deviation SIGMA_LUT_PS (approximated by the sum of twelve uniform
// variates). The delay is inertial: a stage re-evaluates its input after the
// delay has elapsed. Jitter therefore accumulates over time, which is what
// the TRNG samples.
//
// Ports: ena (input), stage_out[i] = output of stage i (one delay chain hangs
// on each). Defaults are the Cyclone V values: 3 stages, 435 ps, 1.5 ps.
// Synthesis tools read the wait-for-change processes as latches; that
// warning stands because the model is for simulation only.
module ring_oscillator #(
  parameter int unsigned N_STAGES     = 3,
  parameter real         D_RO_STAGE_PS = 435.0,
  parameter real         SIGMA_LUT_PS  = 1.5
) (
  input  logic                ena,
  output logic [N_STAGES-1:0] stage_out
);
  timeunit 1ps; timeprecision 10fs;

  // Approximately normal delay of one stage transition.
  function automatic real stage_delay();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom % 1_000_000) / 1.0e6;
    return D_RO_STAGE_PS + SIGMA_LUT_PS * (s - 6.0);
  endfunction

  logic [N_STAGES-1:0] stage_in;

  always_comb begin
    stage_in[0] = ~(ena & stage_out[N_STAGES-1]);
    for (int i = 1; i < N_STAGES; i++) stage_in[i] = stage_out[i-1];
  end

  initial stage_out = '1;  // the rest state with ena low

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    always begin
      if (stage_out[i] == stage_in[i]) begin
        @(stage_in[i]);
      end else begin
        #(stage_delay());
        stage_out[i] = stage_in[i];
      end
    end
  end
endmodule
