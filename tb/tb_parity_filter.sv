// tb_parity_filter: random raw bits with random gaps; every output bit must
// be the XOR of the last ORDER raw bits and come once per ORDER inputs.
// Runs orders 4 (default) and 2.
module tb_parity_filter;
  timeunit 1ps; timeprecision 10fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic ov4, ob4, ov2, ob2;

  parity_filter              dut4 (.clk, .rst_n, .in_valid, .in_bit, .out_valid(ov4), .out_bit(ob4));
  parity_filter #(.ORDER(2)) dut2 (.clk, .rst_n, .in_valid, .in_bit, .out_valid(ov2), .out_bit(ob2));

  always #5000 clk = ~clk;

  bit q4[$], q2[$];
  int n_in = 0, n4 = 0, n2 = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov4) begin
      checks++; n4++;
      if (q4.size() == 0 || ob4 !== q4.pop_front()) begin failures++; $display("FAIL order 4"); end
    end
    if (ov2) begin
      checks++; n2++;
      if (q2.size() == 0 || ob2 !== q2.pop_front()) begin failures++; $display("FAIL order 2"); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit a4, a2;
  initial begin
    a4 = 0; a2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      in_valid = ($urandom_range(3, 0) != 0);
      in_bit   = $urandom_range(1, 0);
      if (in_valid) begin
        n_in++;
        a4 ^= in_bit; a2 ^= in_bit;
        if (n_in % 4 == 0) begin q4.push_back(a4); a4 = 0; end
        if (n_in % 2 == 0) begin q2.push_back(a2); a2 = 0; end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n4 != n_in / 4 || n2 != n_in / 2) begin
      failures++;
      $display("FAIL rate: %0d raw -> %0d (order 4), %0d (order 2)", n_in, n4, n2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
