// tb_capture_bank: random tap states and strobes; q must take the taps on a
// strobed edge and hold otherwise.
module tb_capture_bank;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned N = 3, M = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [N-1:0][M-1:0] taps, q, expq;

  capture_bank #(.N_CHAINS(N), .M_STAGES(M)) dut (.clk, .rst_n, .sample_en, .taps, .q);

  always #5000 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taps = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    expq = '0;
    repeat (2000) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) taps[i] = {$urandom, $urandom};
      sample_en = $urandom_range(1, 0);
      if (sample_en) expq = taps;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL q mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
