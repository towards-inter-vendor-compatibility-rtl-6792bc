// jitter_meter: differential on-chip measurement of accumulated jitter.
//
// Two identical free-running ring oscillators each drive a long tapped delay
// chain. Every system clock cycle with enable high both chains are captured
// and the edge position in each is encoded (first stage differing from stage
// 0). diff = pos_a - pos_b, in bins. Noise common to both oscillators
// (supply, temperature) shifts both edges alike and cancels in diff; the
// spread of diff over many samples, times d_step, is the accumulated
// jitter of the two oscillators, from which the jitter of one LUT follows.
// valid is high in the cycle after a capture in which both edges were found.
//
// The chain must hold a whole half period of the oscillator so an edge is
// always present: M_LONG * d_step > N_STAGES * d_RO_stage, i.e.
// 200 * 7.5 ps = 1500 ps > 3 * 435 ps. The length, the capture of every
// cycle and the difference output are this design's choices; the published design
// describes the setup only as two oscillators with long tapped chains whose
// captured edge positions are compared. Oscillators and chains are
// behavioural models.
module jitter_meter #(
  parameter int unsigned N_STAGES      = 3,
  parameter int unsigned M_LONG        = 200,
  parameter real         D_RO_STAGE_PS = 435.0,
  parameter real         SIGMA_LUT_PS  = 1.5,
  parameter real         STEP_PS [M_LONG] = '{default: 7.5},
  localparam int unsigned PW           = $clog2(M_LONG)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  output logic signed [PW:0] diff,
  output logic              valid
);
  timeunit 1ps; timeprecision 10fs;

  logic [N_STAGES-1:0]   ro_a, ro_b;
  logic [M_LONG-1:0]     tap_a, tap_b;
  logic [1:0][M_LONG-1:0] q;
  logic                  sampled;
  logic                  found_a, found_b;
  logic [PW-1:0]         pos_a, pos_b, vb_a, vb_b;
  logic                  rb_a, rb_b;

  ring_oscillator #(.N_STAGES(N_STAGES), .D_RO_STAGE_PS(D_RO_STAGE_PS),
                    .SIGMA_LUT_PS(SIGMA_LUT_PS)) u_ro_a (.ena(enable), .stage_out(ro_a));
  ring_oscillator #(.N_STAGES(N_STAGES), .D_RO_STAGE_PS(D_RO_STAGE_PS),
                    .SIGMA_LUT_PS(SIGMA_LUT_PS)) u_ro_b (.ena(enable), .stage_out(ro_b));

  delay_chain #(.M_STAGES(M_LONG), .STEP_PS(STEP_PS)) u_chain_a (.din(ro_a[N_STAGES-1]), .tap(tap_a));
  delay_chain #(.M_STAGES(M_LONG), .STEP_PS(STEP_PS)) u_chain_b (.din(ro_b[N_STAGES-1]), .tap(tap_b));

  capture_bank #(.N_CHAINS(2), .M_STAGES(M_LONG)) u_cap (
    .clk, .rst_n, .sample_en(enable), .taps({tap_b, tap_a}), .q
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sampled <= 1'b0;
    else        sampled <= enable;
  end

  priority_encoder #(.M_STAGES(M_LONG)) u_enc_a (
    .c(q[0]), .edge_found(found_a), .position(pos_a), .vbin(vb_a), .raw_bit(rb_a)
  );
  priority_encoder #(.M_STAGES(M_LONG)) u_enc_b (
    .c(q[1]), .edge_found(found_b), .position(pos_b), .vbin(vb_b), .raw_bit(rb_b)
  );

  assign valid = sampled & found_a & found_b;
  assign diff  = $signed({1'b0, pos_a}) - $signed({1'b0, pos_b});
endmodule
