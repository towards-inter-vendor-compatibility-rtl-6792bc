// tb_jitter_meter: runs the differential jitter measurement. Checks that a
// measurement is delivered in almost every cycle, that diff stays inside
// the chain length and is not stuck, and that the
// cycle-to-cycle change of diff has the spread expected from the jitter
// accumulated over one 10 ns clock period by two oscillators:
// sigma = sigma_LUT * sqrt(2 * transitions per period) / d_step bins.
module tb_jitter_meter;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M = 200, PW = $clog2(M);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0;
  logic signed [PW:0] diff;
  logic valid;

  jitter_meter dut (.clk, .rst_n, .enable, .diff, .valid);

  always #5000 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_valid, n_step, prev, n_nonzero;
  bit have_prev;
  real s2, sd, exp_sd;

  initial begin
    n_valid = 0; n_nonzero = 0; n_step = 0; prev = 0; have_prev = 0; s2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) enable = 1;
    repeat (3) @(posedge clk);
    repeat (4000) begin
      @(posedge clk);
      #1;
      if (valid) begin
        int d;
        n_valid++;
        d = int'(diff);
        checks++;
        if (d <= -int'(M) || d >= int'(M)) begin failures++; $display("FAIL diff %0d out of range", d); end
        if (d != 0) n_nonzero++;
        // ignore steps where an edge left a chain and the next one was taken
        if (have_prev && (d - prev) < 20 && (d - prev) > -20) begin
          s2 += real'((d - prev) * (d - prev));
          n_step++;
        end
        prev = d; have_prev = 1;
      end else have_prev = 0;
    end
    sd = $sqrt(s2 / n_step);
    // 10 ns / 435 ps = 23 stage transitions per oscillator and clock period
    exp_sd = 1.5 * $sqrt(2.0 * 10000.0 / 435.0) / 7.5;
    $display("valid %0d of 4000, step sd %.3f bins (expected about %.3f)", n_valid, sd, exp_sd);
    checks++;
    if (n_valid < 3600) begin failures++; $display("FAIL too few measurements"); end
    checks++;
    if (n_nonzero < n_valid / 2) begin failures++; $display("FAIL diff mostly zero"); end
    checks++;
    if (!(sd > 0.5 * exp_sd && sd < 2.0 * exp_sd)) begin failures++; $display("FAIL jitter spread"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
