// Operand encoder of a recomputing unit: the "original operands" and
// "left shift/rotate" boxes in front of each run multiplexer.
//
// Maps an n-bit operand x to the P-bit datapath word of the selected mode:
//   enc = 0 (1st run): x, zero-extended to P bits.
//   enc = 1 (2nd run): RESO   - x << K in P = n+K bits;
//                      RERO   - {0,x} rotated left by K in P = n+1 bits;
//                      M_RESO - x << K truncated to P = n bits.
// Combinational.
module reco_enc
  import vit_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 2,
  parameter reco_mode_t  MODE = RERO,
  localparam int unsigned P   = reco_width(MODE, N, K)
) (
  input  logic [N-1:0] x,
  input  logic         enc,
  output logic [P-1:0] y
);
  logic [P-1:0] ext;
  assign ext = P'(x);

  always_comb begin
    if (!enc)               y = ext;
    else if (MODE == RERO)  y = (ext << K) | (ext >> (P - K));
    else                    y = ext << K;
  end
endmodule
