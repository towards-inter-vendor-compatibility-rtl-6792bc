// tb_dc_trng_top_full: the whole design with every parameter at its default
// (Cyclone V: m = 60, t_A = 20 ns, parity order 4, 200-stage jitter chains).
// Sequence: enable the generator and the jitter meter, run, stop, restart,
// run again; then read out the code-density histogram and clear it.
// Checked: the count of raw ones against the histogram (each raw bit is the
// LSB of the virtual bin of its edge position), output bits against the
// XOR of raw bits, sample and output spacing (12.5 and 5 Mbit/s), histogram
// sums against the raw sample count, histogram clear, oscillator stage
// delay recovered from the period counter, jitter-meter output. Every
// mechanism (sampling strobe, parity output, stop/restart, histogram count
// and clear, period reading, jitter reading) is counted and must have
// happened. Merged virtual bins need a calibration map and are exercised by
// tb_dc_trng_top.
module tb_dc_trng_top_full;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M_CV = 60;
  localparam int RUN = 3000;     // cycles per enabled phase
  localparam int JM_RUN = 600;  // cycles the jitter meters run

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, jm_enable = 0, hist_clear = 0;
  always #5000 clk = ~clk;

  // ---- Cyclone V build, default parameters
  logic cv_rnd, cv_rv, cv_raw, cv_rawv, cv_ne, cv_rocv, cv_jv;
  logic [5:0] cv_addr = '0;
  logic [15:0] cv_cnt, cv_tot, cv_mis;
  logic [7:0] cv_roc;
  logic signed [8:0] cv_jd;
  dc_trng_top u_cv (
    .clk, .rst_n, .enable, .rnd_bit(cv_rnd), .rnd_valid(cv_rv), .raw_bit(cv_raw),
    .raw_valid(cv_rawv), .no_edge(cv_ne), .hist_clear, .hist_rd_addr(cv_addr),
    .hist_rd_count(cv_cnt), .hist_total(cv_tot), .hist_misses(cv_mis),
    .ro_count(cv_roc), .ro_count_valid(cv_rocv), .jm_enable, .jm_diff(cv_jd), .jm_valid(cv_jv));

  typedef struct {
    int raw_n, rnd_n, gap_err, last_raw, last_rnd, merged, ones, ro_n, jit_n;
    real ro_sum;
    bit acc; int acc_n;
    bit exp_q[$];
  } st_t;
  st_t a;
  int cyc = 0, restarts = 0;

  task automatic track(ref st_t s, input logic rawv, raw, rv, rnd, rocv, input logic [7:0] roc,
                       input logic jv, input int t_a, input int order);
    if (rawv) begin
      s.ones += raw;
      if (s.raw_n > 0 && cyc - s.last_raw != t_a && !(restarts > 0 && cyc - s.last_raw > 20))
        s.gap_err++;
      s.last_raw = cyc; s.raw_n++;
      s.acc ^= raw;
      if (++s.acc_n == order) begin s.exp_q.push_back(s.acc); s.acc = 0; s.acc_n = 0; end
    end
    if (rv) begin
      checks++;
      if (s.exp_q.size() == 0 || rnd !== s.exp_q.pop_front()) begin
        failures++; $display("FAIL output bit (t_A %0d)", t_a);
      end
      if (s.rnd_n > 0 && cyc - s.last_rnd != t_a * order && !(restarts > 0 && cyc - s.last_rnd > 20))
        s.gap_err++;
      s.last_rnd = cyc; s.rnd_n++;
    end
    if (rocv && enable) begin s.ro_n++; s.ro_sum += roc; end
    if (jv) s.jit_n++;
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      track(a, cv_rawv, cv_raw, cv_rv, cv_rnd, cv_rocv, cv_roc, cv_jv,
            2, 4);
    end
  end

  initial begin
    repeat (3 * RUN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_hist(string name, ref st_t s, input int m, input logic [M_CV-1:0] map);
    int sum = 0, tot, mis, cnt, v = 0, exp_ones = 0;
    for (int k = 0; k < m; k++) begin
      @(negedge clk);
      cv_addr = 6'(k);
      #1;
      cnt = int'(cv_cnt);
      sum += cnt;
      // raw bit of a sample at position k is the LSB of its virtual bin
      if (k > 0 && map[k]) v++;
      if (v % 2 == 1) exp_ones += cnt;
      if (k > 0 && !map[k]) s.merged += cnt;
    end
    tot = int'(cv_tot);
    mis = int'(cv_mis);
    $display("%s: histogram %0d edges + %0d misses over %0d raw samples; %0d raw ones (%0d from histogram); %0d merged-bin samples",
             name, tot, mis, s.raw_n, s.ones, exp_ones, s.merged);
    checks++;
    if (sum != tot || tot + mis != s.raw_n || tot == 0) begin
      failures++; $display("FAIL %s histogram", name);
    end
    checks++;
    if (s.ones != exp_ones || !(real'(s.ones) / s.raw_n > 0.3 && real'(s.ones) / s.raw_n < 0.7)) begin
      failures++; $display("FAIL %s raw bits do not match their edge positions", name);
    end
  endtask

  task automatic summary(string name, ref st_t s, input real d_ro, input int t_a, input int order);
    real d_est;
    d_est = 10000.0 / (2.0 * 3.0 * (s.ro_sum / s.ro_n));
    $display("%s: %0d raw, %0d output bits, %0d spacing errors, stage delay %.1f ps, %0d jitter readings",
             name, s.raw_n, s.rnd_n, s.gap_err, d_est, s.jit_n);
    checks++;
    if (s.gap_err != 0 || s.raw_n < 2 * RUN / t_a - 4 || s.rnd_n < 2 * RUN / (t_a * order) - 4) begin
      failures++; $display("FAIL %s throughput", name);
    end
    checks++;
    if (!(d_est > d_ro - 5.0 && d_est < d_ro + 5.0)) begin failures++; $display("FAIL %s stage delay", name); end
    checks++;
    if (s.jit_n < JM_RUN - 5) begin failures++; $display("FAIL %s jitter meter", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin enable = 1; jm_enable = 1; end
    fork
      begin repeat (JM_RUN) @(posedge clk); @(negedge clk) jm_enable = 0; end
    join_none
    repeat (RUN) @(posedge clk);
    @(negedge clk) enable = 0;
    repeat (20) @(posedge clk);
    @(negedge clk) begin enable = 1; restarts++; end
    repeat (RUN) @(posedge clk);
    @(negedge clk) enable = 0;
    repeat (30) @(posedge clk);
    summary("cyclone V ", a, 435.0, 2, 4);
    check_hist("cyclone V ", a, M_CV, '1);
    @(negedge clk) hist_clear = 1;
    @(negedge clk) hist_clear = 0;
    #1;
    checks++;
    if (cv_tot != 0 || cv_mis != 0) begin failures++; $display("FAIL clear"); end
    // every mechanism must have happened
    checks++;
    if (a.raw_n == 0 || a.rnd_n == 0 || restarts == 0 ||
        a.ro_n == 0 || a.jit_n == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: strobes %0d, outputs %0d, restarts %0d, period readings %0d, jitter readings %0d",
             a.raw_n, a.rnd_n, restarts, a.ro_n, a.jit_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
