// tb_xor_combine: random captured states, compares the combined vector with
// a bit-by-bit XOR computed here.
module tb_xor_combine;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned N = 3, M = 60;
  int checks = 0, failures = 0;
  logic [N-1:0][M-1:0] q;
  logic [M-1:0] c;

  xor_combine #(.N_CHAINS(N), .M_STAGES(M)) dut (.q, .c);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      for (int i = 0; i < N; i++) q[i] = {$urandom, $urandom};
      #1;
      for (int j = 0; j < M; j++) begin
        checks++;
        if (c[j] !== (q[0][j] ^ q[1][j] ^ q[2][j])) begin
          failures++;
          $display("FAIL bit %0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
