// tb_delay_chain: non-uniform stage delays; after an edge on din, tap j must
// change exactly at the sum of the first j+1 stage delays, for rising and
// falling edges.
module tb_delay_chain;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M = 16;
  localparam real STEP [M] = '{50.5, 6.0, 86.25, 0.5, 81.0, 28.0, 58.0, 1.0,
                               99.0, 2.0, 77.0, 7.5, 81.0, 3.0, 77.0, 9.5};
  int checks = 0, failures = 0;
  logic din = 0;
  logic [M-1:0] tap;

  delay_chain #(.M_STAGES(M), .STEP_PS(STEP)) dut (.din, .tap);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    checks++;
    if (tap !== '0) begin failures++; $display("FAIL settle"); end
    for (int e = 0; e < 4; e++) begin
      realtime t0;
      real acc;
      logic v;
      v = ~din;
      din = v;
      t0 = $realtime;
      acc = 0;
      for (int j = 0; j < M; j++) begin
        acc += STEP[j];
        // just before and just after the expected arrival
        #(t0 + acc - 0.2 - $realtime);
        checks++;
        if (tap[j] !== ~v) begin failures++; $display("FAIL tap %0d early", j); end
        #(0.4);
        checks++;
        if (tap[j] !== v) begin failures++; $display("FAIL tap %0d late", j); end
      end
      #1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
