// ro_period_counter: measures the ring-oscillator frequency, from which the
// delay of one oscillator stage follows.
//
// A W-bit ripple counter is clocked by the oscillator itself: bit 0 toggles
// on each rising edge of ro_clk, bit k on each falling edge of bit k-1. Once
// per system clock cycle the counter is read and the difference to the
// previous reading is output as count, the number of oscillator periods in
// one clock period. d_RO_stage = T_clk / (2 * N_STAGES * count), averaged
// over many readings. valid rises from the second reading on.
//
// A ripple counter read asynchronously can be caught mid-ripple; no
// synchroniser is added (as on the measurement setup, an occasional bad
// reading is averaged out). Width and read-out are this design's choices.
// The ripple flip-flops are clocked by generated clocks on purpose.
module ro_period_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ro_clk,
  output logic [W-1:0] count,
  output logic         valid
);
  timeunit 1ps; timeprecision 10fs;

  logic [W-1:0] rip;
  logic [W-1:0] last;
  logic         seen;

  // one flip-flop per generate scope so that every bit has its own clock
  for (genvar k = 0; k < W; k++) begin : g_rip
    logic t;
    if (k == 0) begin : g_first
      always_ff @(posedge ro_clk or negedge rst_n) begin
        if (!rst_n) t <= 1'b0;
        else        t <= ~t;
      end
    end else begin : g_next
      always_ff @(negedge g_rip[k-1].t or negedge rst_n) begin
        if (!rst_n) t <= 1'b0;
        else        t <= ~t;
      end
    end
    assign rip[k] = t;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last  <= '0;
      count <= '0;
      seen  <= 1'b0;
      valid <= 1'b0;
    end else begin
      last  <= rip;
      count <= rip - last;
      seen  <= 1'b1;
      valid <= seen;
    end
  end
endmodule
