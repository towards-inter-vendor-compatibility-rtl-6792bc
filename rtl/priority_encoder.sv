// priority_encoder: encodes the edge position in the XOR-combined vector c
// and delivers its least significant bit as the raw random bit.
//
// Position: the smallest p in 1 .. M-1 with c[p] != c[0], i.e. the first
// stage where the thermometer code changes (for c = 000111... the position
// is 3 and the raw bit is 1). edge_found is low when all bits are equal; the
// position and raw bit are then 0. The lowest position wins when more than
// one transition was captured.
//
// Virtual bins (adaptive bin calibration): consecutive physical bins may be
// merged into one virtual bin so that the virtual bins are of more equal
// width. VBIN_START[p] = 1 means that physical position p opens a new virtual
// bin; the virtual bin of position p is the number of ones in
// VBIN_START[p:1]. The raw bit is the LSB of the virtual bin, so merged
// bins give the same bit. The all-ones default keeps every physical bin
// (no calibration); a build for a characterised device sets VBIN_START from
// its code-density histogram. Bit 0 of VBIN_START is ignored.
//
// Purely combinational. The position-from-c[0] rule and the VBIN_START
// encoding are this design's choices; the published design fixes only that the
// encoder reports the bin of the virtual chain holding the edge and that
// the LSB is the raw bit.
module priority_encoder #(
  parameter int unsigned       M_STAGES   = 60,
  parameter logic [M_STAGES-1:0] VBIN_START = '1,
  localparam int unsigned      PW         = $clog2(M_STAGES)
) (
  input  logic [M_STAGES-1:0] c,
  output logic                edge_found,
  output logic [PW-1:0]       position,
  output logic [PW-1:0]       vbin,
  output logic                raw_bit
);
  timeunit 1ps; timeprecision 10fs;

  // virtual bin number of every physical position, fixed at elaboration
  function automatic logic [M_STAGES-1:0][PW-1:0] vbin_table();
    logic [M_STAGES-1:0][PW-1:0] t;
    logic [PW-1:0] v;
    v = '0;
    t[0] = '0;
    for (int p = 1; p < M_STAGES; p++) begin
      if (VBIN_START[p]) v = v + 1'b1;
      t[p] = v;
    end
    return t;
  endfunction

  localparam logic [M_STAGES-1:0][PW-1:0] VBIN_OF = vbin_table();

  always_comb begin
    edge_found = 1'b0;
    position   = '0;
    for (int p = M_STAGES - 1; p >= 1; p--) begin
      if (c[p] != c[0]) begin
        edge_found = 1'b1;
        position   = PW'(p);
      end
    end
    vbin    = VBIN_OF[position];
    raw_bit = vbin[0];
  end
endmodule
