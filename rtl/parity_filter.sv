// parity_filter: post-processing of the raw TRNG bits.
//
// Each output bit is the XOR (parity) of ORDER consecutive raw bits; the
// output rate is the raw rate divided by ORDER. ORDER is the smallest value
// for which the output passes the statistical tests: 4 for the calibrated
// Cyclone V build (default), 2 for the calibrated Cyclone IV build.
//
// Interface: in_valid/in_bit deliver one raw bit per strobe; out_valid is
// a one-cycle pulse in the cycle after the ORDER-th raw bit, with out_bit.
// Reset empties the filter. Handshake and reset behaviour are this design's
// own.
module parity_filter #(
  parameter int unsigned ORDER = 4,
  localparam int unsigned CW   = (ORDER > 1) ? $clog2(ORDER) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);
  timeunit 1ps; timeprecision 10fs;

  logic [CW-1:0] cnt;
  logic          acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(ORDER - 1)) begin
          out_valid <= 1'b1;
          out_bit   <= acc ^ in_bit;
          acc       <= 1'b0;
          cnt       <= '0;
        end else begin
          acc <= acc ^ in_bit;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
