// dc_trng_pkg: constants and helper functions shared by the delay-chain TRNG.
//
// The defaults describe the Cyclone V build with adaptive bin calibration:
// n = 3 ring-oscillator stages, m = 60 carry-chain stages (three 10-ALM LABs,
// two carry stages per ALM), accumulation time t_A = 20 ns = 2 periods of the
// 10 ns system clock, parity filter of order 4 (12.5 Mbit/s at 100 MHz).
// The Cyclone IV build is m = 16, t_A = 100 ns (10 periods), order 2 (5 Mbit/s).
// Physical delays (ps) are only used by the behavioural models of the ring
// oscillator and the carry chain.
package dc_trng_pkg;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned CLK_PERIOD_PS = 10_000;  // 100 MHz system clock

  // Cyclone V (default build), calibrated column of the implementation table
  localparam int unsigned CV_N            = 3;
  localparam int unsigned CV_M            = 60;
  localparam int unsigned CV_T_A_CYCLES   = 2;     // t_A = 20 ns
  localparam int unsigned CV_PARITY_ORDER = 4;
  localparam real         CV_D_RO_STAGE_PS = 435.0;
  localparam real         CV_SIGMA_LUT_PS  = 1.5;
  localparam real         CV_D_STEP_PS     = 7.5;  // physical bin, 13 ps after calibration

  // Cyclone IV, calibrated column
  localparam int unsigned CIV_N            = 3;
  localparam int unsigned CIV_M            = 16;
  localparam int unsigned CIV_T_A_CYCLES   = 10;   // t_A = 100 ns
  localparam int unsigned CIV_PARITY_ORDER = 2;
  localparam real         CIV_D_RO_STAGE_PS = 400.0;
  localparam real         CIV_SIGMA_LUT_PS  = 2.6;
  localparam real         CIV_D_STEP_PS     = 42.0; // physical bin, 83 ps after calibration

endpackage
