// tb_ring_oscillator: with ena low every stage rests at 1; with ena high the
// ring oscillates with period 2 * N * D_RO_STAGE_PS and each stage follows
// its predecessor after about D_RO_STAGE_PS. The spread of the measured
// period must match the per-stage jitter: sigma_period = sqrt(2N) * sigma.
module tb_ring_oscillator;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned N = 3;
  localparam real D = 435.0, SIG = 1.5;
  int checks = 0, failures = 0;
  logic ena = 0;
  logic [N-1:0] s;

  ring_oscillator dut (.ena, .stage_out(s));

  realtime t_rise0, t_prev;
  real sum = 0, sum2 = 0;
  int n_per = 0;
  real d01_sum = 0;
  int n_d01 = 0;
  realtime t0_last;

  always @(posedge s[0]) begin
    if (t_prev > 0) begin
      sum  += $realtime - t_prev;
      sum2 += ($realtime - t_prev) ** 2;
      n_per++;
    end
    t_prev = $realtime;
  end
  logic [N-1:0] s_prev = '1;
  always @(s) begin
    if (s[0] != s_prev[0]) t0_last = $realtime;
    if (s[1] != s_prev[1] && t0_last > 0) begin d01_sum += $realtime - t0_last; n_d01++; end
    s_prev = s;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean, sd, exp_sd;
    t_prev = 0; t0_last = 0;
    #3000;
    checks++;
    if (s !== '1) begin failures++; $display("FAIL rest state %b", s); end
    ena = 1;
    #2_000_000;
    mean = sum / n_per;
    sd = $sqrt(sum2 / n_per - mean * mean);
    exp_sd = $sqrt(2.0 * N) * SIG;
    $display("periods=%0d mean=%.2f ps sd=%.3f ps (expected %.1f / %.3f); stage delay %.2f ps",
             n_per, mean, sd, 2 * N * D, exp_sd, d01_sum / n_d01);
    checks++;
    if (n_per < 700 || mean < 2 * N * D - 2.0 || mean > 2 * N * D + 2.0) begin
      failures++; $display("FAIL period");
    end
    checks++;
    if (sd < 0.6 * exp_sd || sd > 1.5 * exp_sd) begin failures++; $display("FAIL jitter"); end
    checks++;
    if (n_d01 < 700 || !(d01_sum / n_d01 > D - 1.0 && d01_sum / n_d01 < D + 1.0)) begin
      failures++; $display("FAIL stage delay");
    end
    ena = 0;
    #5000;
    checks++;
    if (s !== '1) begin failures++; $display("FAIL did not stop %b", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
