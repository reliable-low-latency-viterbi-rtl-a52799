// Result checker of a recomputing unit: the "right shift/rotate" box and the
// XOR that raises the error indication flag.
//
// r1 is the P-bit result of the 1st (normal) run, r2 that of the 2nd (encoded)
// run of the same operands. r2 is decoded and compared with r1:
//   RESO   - r2 >> K must equal r1 on its n low bits;
//   RERO   - r2 rotated right by K must equal r1 on all n+1 bits (the extra
//            bit carries the overflow of the n-bit result);
//   M_RESO - only n-K bits survive the shift, so r2[n-1:K] is compared with
//            r1[n-K-1:0].
// mismatch is 1 when they differ. Combinational.
module reco_cmp
  import vit_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 2,
  parameter reco_mode_t  MODE = RERO,
  localparam int unsigned P   = reco_width(MODE, N, K)
) (
  input  logic [P-1:0] r1,
  input  logic [P-1:0] r2,
  output logic         mismatch
);
  logic [P-1:0] dec;
  always_comb begin
    case (MODE)
      RERO:    dec = (r2 >> K) | (r2 << (P - K));
      default: dec = r2 >> K;
    endcase
    case (MODE)
      RESO:    mismatch = (dec[N-1:0] != r1[N-1:0]);
      RERO:    mismatch = (dec != r1);
      default: mismatch = (dec[N-K-1:0] != r1[N-K-1:0]);
    endcase
  end
endmodule
