// Signature generator for registers and memory words.
//
// Produces an L-bit interleaved parity of a W-bit word: signature bit i is the
// XOR of every data bit j with j mod L == i. L = 1 gives the single parity bit
// ("P") attached to every register of the signature-protected units; L = 2 gives
// the odd/even interleaved parity of the protected memories, which catches any
// burst of two adjacent flipped bits. Combinational.
module sig_gen #(
  parameter int unsigned W = 8,
  parameter int unsigned L = 1
) (
  input  logic [W-1:0] d,
  output logic [L-1:0] s
);
  always_comb begin
    s = '0;
    for (int j = 0; j < W; j++) s[j % L] ^= d[j];
  end
endmodule
