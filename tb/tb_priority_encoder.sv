// tb_priority_encoder: checks edge position, virtual bin and raw bit of the
// priority encoder against a reference written here, for the uncalibrated
// map (all bins kept) and for a map that merges bins.
module tb_priority_encoder;
  timeunit 1ps; timeprecision 10fs;

  localparam int unsigned M  = 60;
  localparam int unsigned PW = $clog2(M);
  // positions 2, 5, 6, 9 ... do not open a new virtual bin
  localparam logic [M-1:0] MERGE = ~60'h0000_0000_0000_264;

  int checks = 0, failures = 0;
  logic [M-1:0] c;
  logic f0, f1, b0, b1;
  logic [PW-1:0] p0, p1, v0, v1;

  priority_encoder #(.M_STAGES(M)) u_id (
    .c, .edge_found(f0), .position(p0), .vbin(v0), .raw_bit(b0));
  priority_encoder #(.M_STAGES(M), .VBIN_START(MERGE)) u_mg (
    .c, .edge_found(f1), .position(p1), .vbin(v1), .raw_bit(b1));

  function automatic int ref_pos(logic [M-1:0] x);
    for (int p = 1; p < M; p++) if (x[p] != x[0]) return p;
    return 0;
  endfunction
  function automatic int ref_vbin(logic [M-1:0] map, int p);
    int v = 0;
    for (int j = 1; j <= p; j++) v += map[j];
    return v;
  endfunction

  task automatic check_vec(logic [M-1:0] x);
    int p, v;
    c = x;
    #1;
    p = ref_pos(x);
    v = ref_vbin(MERGE, p);
    checks++;
    if (f0 !== (p != 0) || p0 !== PW'(p) || v0 !== PW'(p) || b0 !== p[0] ||
        f1 !== (p != 0) || p1 !== PW'(p) || v1 !== PW'(v) || b1 !== v[0]) begin
      failures++;
      $display("FAIL c=%h pos=%0d/%0d exp %0d vbin=%0d exp %0d", x, p0, p1, p, v1, v);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the example of the entropy-extraction drawing: 000111 -> position 3, bit 1
    check_vec({{(M-3){1'b1}}, 3'b000});
    check_vec('0);
    check_vec('1);
    for (int p = 1; p < M; p++) begin
      check_vec(~({M{1'b1}} << p));     // 1..1 then 0..0
      check_vec({M{1'b1}} << p);        // 0..0 then 1..1
    end
    repeat (2000) begin
      logic [M-1:0] x;
      x = {$urandom, $urandom};
      check_vec(x);
      // thermometer code with a second, later transition
      x = {M{1'b1}} << ($urandom_range(M-1, 1));
      x ^= {M{1'b1}} << ($urandom_range(M-1, 1));
      check_vec(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
