// tb_dc_trng: the generator with its behavioural oscillator and chains, in
// four builds side by side:
//   cv     - defaults (Cyclone V calibrated: m = 60, t_A = 2 cycles, order 4)
//   civ    - Cyclone IV calibrated (m = 16, t_A = 10 cycles, order 2, 400 ps
//            stages, 42 ps bins) with a map that merges bin pairs
//   civu_x - Cyclone IV uncalibrated (t_A = 3 cycles, order 8) on a chain
//            whose bins alternate 10 ps / 74 ps (mean 42 ps)
//   civc_x - the same uneven chain, calibrated: pairs merged into 84 ps
//            virtual bins, t_A = 10 cycles, order 2
// For each raw sample the raw bit is recomputed here from the captured
// vector c (edge position, virtual bin, LSB); every output bit is checked
// against the XOR of the matching raw bits; sample and output spacing give
// the throughput (12.5, 5 and 4.17 Mbit/s at 100 MHz). The raw bits of the
// even chains must be roughly balanced; on the uneven chain the
// uncalibrated raw bits must be strongly biased, and calibration must
// remove most of that bias.
module tb_dc_trng;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M_CV = 60, M_CIV = 16;
  // even positions do not open a new virtual bin: bins {1,2}, {3,4}, ...
  localparam logic [M_CIV-1:0] MAP_CIV = 16'b1010_1010_1010_1010;
  // odd stages (odd edge positions, raw bit 1) wide, even stages narrow
  localparam real UNEVEN [M_CIV] = '{10.0, 74.0, 10.0, 74.0, 10.0, 74.0, 10.0, 74.0,
                                     10.0, 74.0, 10.0, 74.0, 10.0, 74.0, 10.0, 74.0};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0;

  logic cv_rnd, cv_rv, cv_raw, cv_rawv, cv_ne;
  logic [M_CV-1:0] cv_c;
  logic [2:0] cv_ro;
  logic civ_rnd, civ_rv, civ_raw, civ_rawv, civ_ne;
  logic [M_CIV-1:0] civ_c;
  logic [2:0] civ_ro;

  dc_trng u_cv (.clk, .rst_n, .enable, .rnd_bit(cv_rnd), .rnd_valid(cv_rv),
                .raw_bit(cv_raw), .raw_valid(cv_rawv), .no_edge(cv_ne), .c(cv_c), .ro_out(cv_ro));

  dc_trng #(.M_STAGES(M_CIV), .T_A_CYCLES(10), .PARITY_ORDER(2), .VBIN_START(MAP_CIV),
            .D_RO_STAGE_PS(400.0), .SIGMA_LUT_PS(2.6), .STEP_PS('{default: 42.0}))
    u_civ (.clk, .rst_n, .enable, .rnd_bit(civ_rnd), .rnd_valid(civ_rv),
           .raw_bit(civ_raw), .raw_valid(civ_rawv), .no_edge(civ_ne), .c(civ_c), .ro_out(civ_ro));

  logic xu_rnd, xu_rv, xu_raw, xu_rawv, xu_ne, xc_rnd, xc_rv, xc_raw, xc_rawv, xc_ne;
  logic [M_CIV-1:0] xu_c, xc_c;
  logic [2:0] xu_ro, xc_ro;
  dc_trng #(.M_STAGES(M_CIV), .T_A_CYCLES(3), .PARITY_ORDER(8),
            .D_RO_STAGE_PS(400.0), .SIGMA_LUT_PS(2.6), .STEP_PS(UNEVEN))
    u_xu (.clk, .rst_n, .enable, .rnd_bit(xu_rnd), .rnd_valid(xu_rv),
          .raw_bit(xu_raw), .raw_valid(xu_rawv), .no_edge(xu_ne), .c(xu_c), .ro_out(xu_ro));
  dc_trng #(.M_STAGES(M_CIV), .T_A_CYCLES(10), .PARITY_ORDER(2), .VBIN_START(MAP_CIV),
            .D_RO_STAGE_PS(400.0), .SIGMA_LUT_PS(2.6), .STEP_PS(UNEVEN))
    u_xc (.clk, .rst_n, .enable, .rnd_bit(xc_rnd), .rnd_valid(xc_rv),
          .raw_bit(xc_raw), .raw_valid(xc_rawv), .no_edge(xc_ne), .c(xc_c), .ro_out(xc_ro));

  always #5000 clk = ~clk;

  // reference: raw bit from the captured vector
  function automatic logic ref_bit(logic [M_CV-1:0] x, int m, logic [M_CV-1:0] map, output bit found);
    int p = 0, v = 0;
    for (int j = m - 1; j >= 1; j--) if (x[j] != x[0]) p = j;
    found = (p != 0);
    for (int j = 1; j <= p; j++) v += map[j];
    return v[0];
  endfunction

  typedef struct {
    int  raw_n, rnd_n, ones, last_raw, last_rnd, gap_err, misses;
    bit  acc;
    int  acc_n;
    bit  exp_q[$];
  } stats_t;
  stats_t s_cv, s_civ, s_xu, s_xc;
  int cyc = 0;

  task automatic track(ref stats_t s, input logic rawv, raw, ne, rv, rnd,
                       input logic [M_CV-1:0] c, input int m, input logic [M_CV-1:0] map,
                       input int t_a, input int order);
    bit found;
    logic e;
    if (rawv) begin
      e = ref_bit(c, m, map, found);
      checks++;
      if (raw !== e || ne !== !found) begin
        failures++; $display("FAIL m=%0d raw bit %b expected %b (c=%h)", m, raw, e, c);
      end
      if (!found) s.misses++;
      if (s.raw_n > 0 && cyc - s.last_raw != t_a) s.gap_err++;
      s.last_raw = cyc;
      s.raw_n++;
      s.ones += raw;
      s.acc ^= raw;
      if (++s.acc_n == order) begin s.exp_q.push_back(s.acc); s.acc = 0; s.acc_n = 0; end
    end
    if (rv) begin
      checks++;
      if (s.exp_q.size() == 0 || rnd !== s.exp_q.pop_front()) begin
        failures++; $display("FAIL m=%0d output bit", m);
      end
      if (s.rnd_n > 0 && cyc - s.last_rnd != t_a * order) s.gap_err++;
      s.last_rnd = cyc;
      s.rnd_n++;
    end
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      track(s_cv,  cv_rawv,  cv_raw,  cv_ne,  cv_rv,  cv_rnd,  cv_c, M_CV, '1, 2, 4);
      track(s_civ, civ_rawv, civ_raw, civ_ne, civ_rv, civ_rnd, M_CV'(civ_c), M_CIV,
            M_CV'(MAP_CIV), 10, 2);
      track(s_xu, xu_rawv, xu_raw, xu_ne, xu_rv, xu_rnd, M_CV'(xu_c), M_CIV, '1, 3, 8);
      track(s_xc, xc_rawv, xc_raw, xc_ne, xc_rv, xc_rnd, M_CV'(xc_c), M_CIV,
            M_CV'(MAP_CIV), 10, 2);
    end
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bias(stats_t s);
    real f = real'(s.ones) / s.raw_n;
    return (f > 0.5) ? f - 0.5 : 0.5 - f;
  endfunction

  task automatic summary(string name, ref stats_t s, input int exp_raw, input int exp_rnd,
                         input real lo = 0.35, input real hi = 0.65);
    real f;
    f = real'(s.ones) / s.raw_n;
    $display("%s: %0d raw bits (%.3f ones, %0d without edge), %0d output bits, %0d spacing errors",
             name, s.raw_n, f, s.misses, s.rnd_n, s.gap_err);
    checks++;
    if (s.gap_err != 0) begin failures++; $display("FAIL %s throughput", name); end
    checks++;
    if (s.raw_n < exp_raw - 2 || s.raw_n > exp_raw + 2 || s.rnd_n < exp_rnd - 2 || s.rnd_n > exp_rnd + 2) begin
      failures++; $display("FAIL %s sample counts", name);
    end
    checks++;
    if (!(f > lo && f < hi)) begin failures++; $display("FAIL %s bias", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) enable = 1;
    repeat (8000) @(posedge clk);
    @(negedge clk) enable = 0;
    repeat (30) @(posedge clk);
    summary("cyclone V ", s_cv, 8000 / 2, 8000 / 8);
    summary("cyclone IV", s_civ, 8000 / 10, 8000 / 20);
    summary("uneven IV uncalibrated ", s_xu, 8000 / 3, 8000 / 24, 0.75, 1.0);
    summary("uneven IV calibrated   ", s_xc, 8000 / 10, 8000 / 20, 0.3, 0.7);
    // calibration must remove most of the bias of the uneven chain
    checks++;
    if (!(bias(s_xc) < 0.5 * bias(s_xu))) begin
      failures++; $display("FAIL calibration did not reduce the bias");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
