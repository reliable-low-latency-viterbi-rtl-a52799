// Ripple-carry adder whose carry chain can start at slice 0 or at slice K.
//
// In the normal run (enc = 0) it is a plain W-bit ripple adder: the carry-in
// enters slice 0 and the carry ripples up to slice W-1. In the encoded run of
// recomputing with rotated operands (ROT = 1 and enc = 1) the operands arrive
// rotated left by K, so the original bit 0 sits in slice K: the carry-in then
// enters slice K, ripples up to slice W-1 and wraps around from slice W-1 to
// slice 0, ending at slice K-1. The same physical slices thus compute different
// original bit positions in the two runs, which is what lets a fault in one
// slice show up as a mismatch. With ROT = 0 the enc input is ignored (shifted
// operands need no change to the adder). Used for both the adders and the
// subtractors (b inverted, carry-in 1) of the recomputing units. Combinational.
module rr_adder #(
  parameter int unsigned W   = 9,
  parameter int unsigned K   = 2,
  parameter bit          ROT = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         enc,
  output logic [W-1:0] s,
  output logic         cout
);
  always_comb begin
    logic c;
    int unsigned j;
    c = cin;
    s = '0;
    for (int unsigned i = 0; i < W; i++) begin
      j = (ROT && enc) ? ((i + K) % W) : i;
      s[j] = a[j] ^ b[j] ^ c;
      c    = (a[j] & b[j]) | (c & (a[j] ^ b[j]));
    end
    cout = c;
  end
endmodule
