// dc_trng_top: the delay-chain TRNG together with the on-chip circuits used
// to characterise it on a new FPGA family.
//
//  * u_trng  (dc_trng): the generator. rnd_bit/rnd_valid is the
//    post-processed output, raw_bit/raw_valid the raw bits before the
//    parity filter, no_edge flags a raw sample with no captured edge.
//  * u_hist  (code_density_hist): code density test on the TRNG's own
//    captured XOR vector, one count per raw sample; the per-bin counts give
//    the bin widths from which a calibration map (VBIN_START) is derived.
//    Read with hist_rd_addr / hist_rd_count; hist_clear restarts it.
//  * u_rocnt (ro_period_counter): ripple counter on oscillator stage 0,
//    oscillator periods per system clock period -> d_RO_stage.
//  * u_jit   (jitter_meter): two extra oscillators with long chains for the
//    differential jitter measurement -> sigma_LUT; runs while jm_enable.
//
// Attaching the histogram and the period counter to the TRNG itself (rather
// than to a separate measurement set-up) is this design's choice. All
// defaults are those of the calibrated Cyclone V build: n = 3, m = 60,
// t_A = 20 ns, parity order 4, 12.5 Mbit/s at a 100 MHz clock; the delay
// parameters (ps) only reach the behavioural oscillator and chain models,
// whose bins are uniform at this level (D_STEP_PS).
module dc_trng_top #(
  parameter int unsigned         N_STAGES     = dc_trng_pkg::CV_N,
  parameter int unsigned         M_STAGES     = dc_trng_pkg::CV_M,
  parameter int unsigned         T_A_CYCLES   = dc_trng_pkg::CV_T_A_CYCLES,
  parameter int unsigned         PARITY_ORDER = dc_trng_pkg::CV_PARITY_ORDER,
  parameter logic [M_STAGES-1:0] VBIN_START   = '1,
  parameter real                 D_RO_STAGE_PS = dc_trng_pkg::CV_D_RO_STAGE_PS,
  parameter real                 SIGMA_LUT_PS  = dc_trng_pkg::CV_SIGMA_LUT_PS,
  parameter real                 D_STEP_PS     = dc_trng_pkg::CV_D_STEP_PS,
  parameter int unsigned         M_LONG       = 200,
  parameter int unsigned         HIST_W       = 16,
  parameter int unsigned         ROCNT_W      = 8,
  localparam int unsigned        PW           = $clog2(M_STAGES),
  localparam int unsigned        JW           = $clog2(M_LONG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  output logic                 rnd_bit,
  output logic                 rnd_valid,
  output logic                 raw_bit,
  output logic                 raw_valid,
  output logic                 no_edge,
  input  logic                 hist_clear,
  input  logic [PW-1:0]        hist_rd_addr,
  output logic [HIST_W-1:0]    hist_rd_count,
  output logic [HIST_W-1:0]    hist_total,
  output logic [HIST_W-1:0]    hist_misses,
  output logic [ROCNT_W-1:0]   ro_count,
  output logic                 ro_count_valid,
  input  logic                 jm_enable,
  output logic signed [JW:0]   jm_diff,
  output logic                 jm_valid
);
  timeunit 1ps; timeprecision 10fs;

  logic [M_STAGES-1:0] c;
  logic [N_STAGES-1:0] ro_out;

  dc_trng #(
    .N_STAGES(N_STAGES), .M_STAGES(M_STAGES), .T_A_CYCLES(T_A_CYCLES),
    .PARITY_ORDER(PARITY_ORDER), .VBIN_START(VBIN_START),
    .D_RO_STAGE_PS(D_RO_STAGE_PS), .SIGMA_LUT_PS(SIGMA_LUT_PS),
    .STEP_PS('{default: D_STEP_PS})
  ) u_trng (
    .clk, .rst_n, .enable, .rnd_bit, .rnd_valid, .raw_bit, .raw_valid,
    .no_edge, .c, .ro_out
  );

  code_density_hist #(.M_STAGES(M_STAGES), .CNT_W(HIST_W)) u_hist (
    .clk, .rst_n, .clear(hist_clear), .sample_valid(raw_valid), .c,
    .rd_addr(hist_rd_addr), .rd_count(hist_rd_count), .total(hist_total),
    .misses(hist_misses)
  );

  ro_period_counter #(.W(ROCNT_W)) u_rocnt (
    .clk, .rst_n, .ro_clk(ro_out[0]), .count(ro_count), .valid(ro_count_valid)
  );

  jitter_meter #(
    .N_STAGES(N_STAGES), .M_LONG(M_LONG), .D_RO_STAGE_PS(D_RO_STAGE_PS),
    .SIGMA_LUT_PS(SIGMA_LUT_PS), .STEP_PS('{default: D_STEP_PS})
  ) u_jit (
    .clk, .rst_n, .enable(jm_enable), .diff(jm_diff), .valid(jm_valid)
  );
endmodule
