// tb_ro_period_counter: an oscillator of known period drives the ripple
// counter; every reading must be floor or ceil of T_clk / T_ro and their
// mean must give back the oscillator period. Two periods are tried.
module tb_ro_period_counter;
  timeunit 1ps; timeprecision 10fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ro_clk = 0;
  logic [7:0] count;
  logic valid;
  real half_ps = 1305.0;   // 3 stages * 435 ps

  ro_period_counter dut (.clk, .rst_n, .ro_clk, .count, .valid);

  always #5000 clk = ~clk;
  always #(half_ps) ro_clk = ~ro_clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int n);
    real ratio, mean;
    int sum = 0, got = 0;
    ratio = 10000.0 / (2.0 * half_ps);
    repeat (4) @(posedge clk);
    repeat (n) begin
      @(posedge clk);
      #1;
      if (valid) begin
        checks++; got++;
        sum += count;
        if (count != 8'($rtoi(ratio)) && count != 8'($rtoi(ratio) + 1)) begin
          failures++; $display("FAIL count %0d for ratio %.3f", count, ratio);
        end
      end
    end
    mean = real'(sum) / got;
    $display("ratio %.4f measured %.4f over %0d readings", ratio, mean, got);
    checks++;
    if (got < n - 1 || mean < ratio - 0.02 || mean > ratio + 0.02) begin
      failures++; $display("FAIL mean");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(2000);
    half_ps = 1200.0;  // 3 stages * 400 ps
    measure(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
