// tb_dc_trng_top: end-to-end run of the whole design in two builds:
//   cv  - all defaults (Cyclone V: m = 60, t_A = 20 ns, order 4)
//   civ - Cyclone IV (m = 16, t_A = 100 ns, order 2, 400 ps stages, 42 ps
//         bins, 200-stage jitter chains) with bin pairs merged by VBIN_START
// Sequence: enable the generator and the jitter meter, run, stop, restart,
// run again; then read out the code-density histogram and clear it.
// Checked: the count of raw ones against the histogram (each raw bit is the
// LSB of the virtual bin of its edge position), output bits against the
// XOR of raw bits, sample and output spacing (12.5 and 5 Mbit/s), histogram
// sums against the raw sample count, histogram clear, oscillator stage
// delay recovered from the period counter, jitter-meter output. Every
// mechanism (sampling strobe, parity output, stop/restart, merged virtual
// bin, histogram count and clear, period reading, jitter reading) is
// counted and must have happened.
module tb_dc_trng_top;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M_CV = 60, M_CIV = 16;
  localparam logic [M_CIV-1:0] MAP_CIV = 16'b1010_1010_1010_1010;
  localparam int RUN = 600;     // cycles per enabled phase
  localparam int JM_RUN = 300;  // cycles the jitter meters run

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

  // ---- Cyclone IV build
  logic iv_rnd, iv_rv, iv_raw, iv_rawv, iv_ne, iv_rocv, iv_jv;
  logic [3:0] iv_addr = '0;
  logic [15:0] iv_cnt, iv_tot, iv_mis;
  logic [7:0] iv_roc;
  logic signed [8:0] iv_jd;
  dc_trng_top #(.M_STAGES(M_CIV), .T_A_CYCLES(10), .PARITY_ORDER(2), .VBIN_START(MAP_CIV),
                .D_RO_STAGE_PS(400.0), .SIGMA_LUT_PS(2.6), .D_STEP_PS(42.0)) u_civ (
    .clk, .rst_n, .enable, .rnd_bit(iv_rnd), .rnd_valid(iv_rv), .raw_bit(iv_raw),
    .raw_valid(iv_rawv), .no_edge(iv_ne), .hist_clear, .hist_rd_addr(iv_addr),
    .hist_rd_count(iv_cnt), .hist_total(iv_tot), .hist_misses(iv_mis),
    .ro_count(iv_roc), .ro_count_valid(iv_rocv), .jm_enable, .jm_diff(iv_jd), .jm_valid(iv_jv));

  typedef struct {
    int raw_n, rnd_n, gap_err, last_raw, last_rnd, merged, ones, ro_n, jit_n;
    real ro_sum;
    bit acc; int acc_n;
    bit exp_q[$];
  } st_t;
  st_t a, b;
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
      track(b, iv_rawv, iv_raw, iv_rv, iv_rnd, iv_rocv, iv_roc, iv_jv, 10, 2);
    end
  end

  initial begin
    repeat (3 * RUN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_hist(string name, ref st_t s, input int m, input bit cv,
                            input logic [M_CV-1:0] map);
    int sum = 0, tot, mis, cnt, v = 0, exp_ones = 0;
    for (int k = 0; k < m; k++) begin
      @(negedge clk);
      if (cv) cv_addr = 6'(k); else iv_addr = 4'(k);
      #1;
      cnt = cv ? int'(cv_cnt) : int'(iv_cnt);
      sum += cnt;
      // raw bit of a sample at position k is the LSB of its virtual bin
      if (k > 0 && map[k]) v++;
      if (v % 2 == 1) exp_ones += cnt;
      if (k > 0 && !map[k]) s.merged += cnt;
    end
    tot = cv ? int'(cv_tot) : int'(iv_tot);
    mis = cv ? int'(cv_mis) : int'(iv_mis);
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
    summary("cyclone IV", b, 400.0, 10, 2);
    check_hist("cyclone V ", a, M_CV, 1, '1);
    check_hist("cyclone IV", b, M_CIV, 0, M_CV'(MAP_CIV));
    @(negedge clk) hist_clear = 1;
    @(negedge clk) hist_clear = 0;
    #1;
    checks++;
    if (cv_tot != 0 || iv_tot != 0 || cv_mis != 0) begin failures++; $display("FAIL clear"); end
    // every mechanism must have happened
    checks++;
    if (a.raw_n == 0 || a.rnd_n == 0 || b.rnd_n == 0 || restarts == 0 || b.merged == 0 ||
        a.ro_n == 0 || a.jit_n == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: strobes %0d/%0d, outputs %0d/%0d, restarts %0d, merged-bin samples %0d, period readings %0d, jitter readings %0d",
             a.raw_n, b.raw_n, a.rnd_n, b.rnd_n, restarts, b.merged, a.ro_n, a.jit_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
