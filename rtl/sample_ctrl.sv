// sample_ctrl: timing of the delay-chain TRNG.
//
// While enable is high the ring oscillator runs (ena = 1) and a one-cycle
// sample strobe is issued every T_A_CYCLES system clock cycles, so jitter
// accumulates for t_A = T_A_CYCLES * 10 ns before every sample. The first
// strobe comes T_A_CYCLES cycles after enable rises. Dropping enable stops
// the oscillator and restarts the count.
//
// The published design gives t_A as a multiple of the 10 ns clock period (20 ns for
// the calibrated Cyclone V build, the default; 100 ns for Cyclone IV). That
// the oscillator keeps running between samples rather than being restarted
// for each one is this design's reading: it gives one raw bit per t_A,
// which matches the throughputs reported for the TRNG.
module sample_ctrl #(
  parameter int unsigned T_A_CYCLES = 2,
  localparam int unsigned CW        = (T_A_CYCLES > 1) ? $clog2(T_A_CYCLES) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic ena,
  output logic sample_en
);
  timeunit 1ps; timeprecision 10fs;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ena       <= 1'b0;
      cnt       <= '0;
      sample_en <= 1'b0;
    end else begin
      ena       <= enable;
      sample_en <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (cnt == CW'(T_A_CYCLES - 1)) begin
        cnt       <= '0;
        sample_en <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
