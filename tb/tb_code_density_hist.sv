// tb_code_density_hist: feeds thermometer codes with known edge positions
// (and some vectors with no edge), then compares every bin, the total and
// the miss count with counts kept here; checks clear.
module tb_code_density_hist;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M = 60, W = 16, PW = $clog2(M);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, sample_valid = 0;
  logic [M-1:0] c = '0;
  logic [PW-1:0] rd_addr = '0;
  logic [W-1:0] rd_count, total, misses;
  int exp_h [M];
  int exp_total = 0, exp_miss = 0;

  code_density_hist #(.M_STAGES(M), .CNT_W(W)) dut (
    .clk, .rst_n, .clear, .sample_valid, .c, .rd_addr, .rd_count, .total, .misses);

  always #5000 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < M; b++) begin
      @(negedge clk) rd_addr = PW'(b);
      #1;
      checks++;
      if (rd_count != W'(exp_h[b])) begin
        failures++; $display("FAIL bin %0d: %0d expected %0d", b, rd_count, exp_h[b]);
      end
    end
    checks++;
    if (total != W'(exp_total) || misses != W'(exp_miss)) begin
      failures++; $display("FAIL total %0d/%0d misses %0d/%0d", total, exp_total, misses, exp_miss);
    end
  endtask

  initial begin
    foreach (exp_h[b]) exp_h[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) begin
      int p;
      @(negedge clk);
      sample_valid = ($urandom_range(4, 0) != 0);
      p = $urandom_range(M, 1);          // M: no edge
      if (p == M) c = {M{1'($urandom_range(1, 0))}};
      else        c = {M{1'b1}} << p;
      if ($urandom_range(1, 0)) c = ~c;
      if (sample_valid) begin
        if (p == M) exp_miss++;
        else begin exp_h[p]++; exp_total++; end
      end
    end
    @(negedge clk) sample_valid = 0;
    check_all();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (exp_h[b]) exp_h[b] = 0;
    exp_total = 0; exp_miss = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
