// capture_bank: the N x M sampling flip-flops of the delay-chain TRNG.
//
// Every delay-chain stage output has a flip-flop clocked by the system clock.
// On a clock edge with sample_en high the flip-flops record the momentary
// state of all N chains; otherwise they hold. q[i][j] is stage j of chain i
// (Q(i+1)(j+1) in the usual drawing). The taps are asynchronous to clk, so a
// flip-flop may go metastable; that is part of the entropy extraction and is
// not resolved here.
//
// Timing: q is valid one cycle after the sample_en cycle. Reset clears q.
// The clock-enable form of the sampling strobe is this design's choice; the
// published design records the chains on the rising edge of CLK after
// the accumulation time.
module capture_bank #(
  parameter int unsigned N_CHAINS = 3,
  parameter int unsigned M_STAGES = 60
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               sample_en,
  input  logic [N_CHAINS-1:0][M_STAGES-1:0]  taps,
  output logic [N_CHAINS-1:0][M_STAGES-1:0]  q
);
  timeunit 1ps; timeprecision 10fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= '0;
    else if (sample_en) q <= taps;
  end
endmodule
