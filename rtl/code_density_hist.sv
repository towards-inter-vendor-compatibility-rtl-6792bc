// code_density_hist: code density test of a tapped delay chain.
//
// The chain is fed from a ring oscillator whose frequency is unrelated to
// the system clock, so the edge is equally likely to sit anywhere in the
// chain when it is sampled. Counting, per bin, how often the edge is found
// there gives the relative time width of every bin; the average width is
// d_step, and the widths are what adaptive bin calibration needs to choose
// the virtual bins (VBIN_START of priority_encoder).
//
// Each cycle with sample_valid high, the edge position of c (same rule as
// priority_encoder: first bit differing from c[0]) increments hist[position]
// and the total; a sample without an edge increments only misses. Counters
// saturate at 2^CNT_W - 1. clear zeroes everything in one cycle.
// Read port: rd_count = hist[rd_addr], combinational. Bin 0 never counts.
// Counter width, saturation and the read port are this design's choices.
module code_density_hist #(
  parameter int unsigned M_STAGES = 60,
  parameter int unsigned CNT_W    = 16,
  localparam int unsigned PW      = $clog2(M_STAGES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                sample_valid,
  input  logic [M_STAGES-1:0] c,
  input  logic [PW-1:0]       rd_addr,
  output logic [CNT_W-1:0]    rd_count,
  output logic [CNT_W-1:0]    total,
  output logic [CNT_W-1:0]    misses
);
  timeunit 1ps; timeprecision 10fs;

  logic [CNT_W-1:0] hist [M_STAGES];
  logic             edge_found;
  logic [PW-1:0]    position, vbin_unused;
  logic             bit_unused;

  priority_encoder #(.M_STAGES(M_STAGES)) u_pos (
    .c, .edge_found, .position, .vbin(vbin_unused), .raw_bit(bit_unused)
  );

  function automatic logic [CNT_W-1:0] sat_inc(input logic [CNT_W-1:0] x);
    return (&x) ? x : x + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < M_STAGES; b++) hist[b] <= '0;
      total  <= '0;
      misses <= '0;
    end else if (clear) begin
      for (int b = 0; b < M_STAGES; b++) hist[b] <= '0;
      total  <= '0;
      misses <= '0;
    end else if (sample_valid) begin
      if (edge_found) begin
        hist[position] <= sat_inc(hist[position]);
        total          <= sat_inc(total);
      end else begin
        misses <= sat_inc(misses);
      end
    end
  end

  assign rd_count = (int'(rd_addr) < M_STAGES) ? hist[rd_addr] : '0;
endmodule
