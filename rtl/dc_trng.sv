// dc_trng: delay-chain true random number generator.
//
// Entropy source: an N_STAGES ring oscillator whose edges carry timing
// jitter. A delay chain (carry chain) of M_STAGES stages hangs on the output
// of every oscillator stage and spreads each edge out in time with a
// resolution of one carry stage (a few ps), far finer than a LUT delay.
// sample_ctrl enables the oscillator and, every t_A = T_A_CYCLES clock
// periods, strobes capture_bank, which records all N x M chain stages.
// xor_combine folds the N captured thermometer codes into one vector c whose
// single transition marks where the jittery edge was; priority_encoder turns
// that position (mapped to a virtual bin, see VBIN_START) into the raw bit,
// its LSB. parity_filter XORs PARITY_ORDER raw bits into one output bit.
//
// Timing: strobe in cycle k -> chains captured at the next edge -> raw_valid
// and raw_bit in cycle k+1 -> rnd_valid pulse one cycle after every
// PARITY_ORDER-th raw bit. Throughput is f_clk / (T_A_CYCLES * PARITY_ORDER):
// 100 MHz / (2 * 4) = 12.5 Mbit/s with the defaults (calibrated Cyclone V).
// no_edge flags a raw sample whose vector held no transition; that sample is
// still used (raw bit 0), which keeps the rate fixed.
//
// The oscillator and the chains are behavioural models (ring_oscillator,
// delay_chain); on silicon they are hand-placed LUTs and carry chains.
// Everything else is synthesizable. Parameter defaults follow the published
// Cyclone V build; VBIN_START (the calibration map) defaults to no merging
// because the map is device specific.
module dc_trng #(
  parameter int unsigned         N_STAGES      = dc_trng_pkg::CV_N,
  parameter int unsigned         M_STAGES      = dc_trng_pkg::CV_M,
  parameter int unsigned         T_A_CYCLES    = dc_trng_pkg::CV_T_A_CYCLES,
  parameter int unsigned         PARITY_ORDER  = dc_trng_pkg::CV_PARITY_ORDER,
  parameter logic [M_STAGES-1:0] VBIN_START    = '1,
  parameter real                 D_RO_STAGE_PS = dc_trng_pkg::CV_D_RO_STAGE_PS,
  parameter real                 SIGMA_LUT_PS  = dc_trng_pkg::CV_SIGMA_LUT_PS,
  parameter real                 STEP_PS [M_STAGES] = '{default: dc_trng_pkg::CV_D_STEP_PS}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  output logic                rnd_bit,
  output logic                rnd_valid,
  output logic                raw_bit,
  output logic                raw_valid,
  output logic                no_edge,
  output logic [M_STAGES-1:0] c,         // XOR-combined captured vector
  output logic [N_STAGES-1:0] ro_out     // oscillator stage outputs
);
  timeunit 1ps; timeprecision 10fs;

  logic                              ena, sample_en;
  logic [N_STAGES-1:0][M_STAGES-1:0] taps, q;
  logic                              edge_found;
  logic [$clog2(M_STAGES)-1:0]       position, vbin;

  sample_ctrl #(.T_A_CYCLES(T_A_CYCLES)) u_ctrl (
    .clk, .rst_n, .enable, .ena, .sample_en
  );

  ring_oscillator #(
    .N_STAGES(N_STAGES), .D_RO_STAGE_PS(D_RO_STAGE_PS), .SIGMA_LUT_PS(SIGMA_LUT_PS)
  ) u_ro (
    .ena, .stage_out(ro_out)
  );

  for (genvar i = 0; i < N_STAGES; i++) begin : g_chain
    delay_chain #(.M_STAGES(M_STAGES), .STEP_PS(STEP_PS)) u_chain (
      .din(ro_out[i]), .tap(taps[i])
    );
  end

  capture_bank #(.N_CHAINS(N_STAGES), .M_STAGES(M_STAGES)) u_cap (
    .clk, .rst_n, .sample_en, .taps, .q
  );

  xor_combine #(.N_CHAINS(N_STAGES), .M_STAGES(M_STAGES)) u_xor (.q, .c);

  priority_encoder #(.M_STAGES(M_STAGES), .VBIN_START(VBIN_START)) u_enc (
    .c, .edge_found, .position, .vbin, .raw_bit
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) raw_valid <= 1'b0;
    else        raw_valid <= sample_en;
  end

  assign no_edge = raw_valid & ~edge_found;

  parity_filter #(.ORDER(PARITY_ORDER)) u_pf (
    .clk, .rst_n, .in_valid(raw_valid), .in_bit(raw_bit),
    .out_valid(rnd_valid), .out_bit(rnd_bit)
  );
endmodule
