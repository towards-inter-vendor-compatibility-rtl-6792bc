// tb_sample_ctrl: the strobe must come every T_A_CYCLES cycles, the first one
// T_A_CYCLES cycles after enable, and stop when enable drops. Runs t_A = 2
// (default, 20 ns) and 10 cycles (100 ns).
module tb_sample_ctrl;
  timeunit 1ps; timeprecision 10fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0;
  logic ena2, se2, ena10, se10;

  sample_ctrl                    d2  (.clk, .rst_n, .enable, .ena(ena2),  .sample_en(se2));
  sample_ctrl #(.T_A_CYCLES(10)) d10 (.clk, .rst_n, .enable, .ena(ena10), .sample_en(se10));

  always #5000 clk = ~clk;

  int cyc = 0, en_cyc = 0;
  int last2 = -1, last10 = -1, n2 = 0, n10 = 0;

  // cyc counts rising edges; en_cyc is the edge at which enable was seen high
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (se2) begin
        checks++; n2++;
        if (!enable) begin failures++; $display("FAIL strobe while disabled"); end
        if ((last2 < 0 && cyc - en_cyc != 2) || (last2 >= 0 && cyc - last2 != 2)) begin
          failures++; $display("FAIL t_A=2 strobe spacing at cycle %0d", cyc);
        end
        last2 <= cyc;
      end
      if (se10) begin
        checks++; n10++;
        if ((last10 < 0 && cyc - en_cyc != 10) || (last10 >= 0 && cyc - last10 != 10)) begin
          failures++; $display("FAIL t_A=10 strobe spacing at cycle %0d", cyc);
        end
        last10 <= cyc;
      end
      checks++;
      if (ena2 !== ena10) begin failures++; $display("FAIL ena"); end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) begin
      @(negedge clk);
      enable = 1;
      en_cyc = cyc;  // value cyc holds at the first edge that sees enable high
      last2 = -1; last10 = -1;
      repeat (103) @(posedge clk);
      #1;
      checks++;
      if (!ena2) begin failures++; $display("FAIL ena low while enabled"); end
      @(negedge clk);
      enable = 0;
      repeat (5) @(posedge clk);
      #1;
      checks++;
      if (ena2 || se2 || se10) begin failures++; $display("FAIL not stopped"); end
    end
    checks++;
    if (n2 != 3 * 51 || n10 != 3 * 10) begin
      failures++; $display("FAIL strobe counts %0d %0d", n2, n10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
