// Self-checking carry-select adder based on two-rail encoding.
//
// Two W-bit ripple-carry adders run side by side, one with carry-in 0 (sum
// S0, carries C0) and one with carry-in 1 (S1, C1). The real carry-in picks
// one of them through W+1 multiplexers (W sum bits and the carry-out).
// The two rails check each other: with carry-in 1 instead of 0, sum bit i flips
// exactly when every lower bit propagates. Because bit 0 of S0 is the
// propagate of bit 0, and a lower bit can only pass on the flipped carry when
// its S0 bit is 1, the flip condition is the AND chain
//   d1 = S0[0],  di = d(i-1) & S0[i-1]   (W-2 AND gates),
// and the predicted complement of S1[i] is  S0[i] XNOR di  (W-1 XNOR gates;
// for bit 0 it is S0[0] itself). Each pair (S1[i], ~S1[i] predicted) is a
// two-rail code word; W-1 two-pair two-rail checkers fold the W pairs into
// (z1,z2). Fault free, z1 != z2; err = (z1 == z2).
// The gate counts (2W full adders, W+1 MUXes, W-1 XNORs, W-2 ANDs, W-1
// checkers) are those of the published adder; the exact AND-chain inputs are
// this design's reading of the structure. Combinational, no clock.
module sc_csel_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         z1,
  output logic         z2,
  output logic         err
);
  logic [W-1:0] s0, s1, s1_n, d;
  logic [W:0]   c0, c1;

  // Two ripple-carry rails.
  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_rail
    assign s0[i]   = a[i] ^ b[i] ^ c0[i];
    assign c0[i+1] = (a[i] & b[i]) | (c0[i] & (a[i] ^ b[i]));
    assign s1[i]   = a[i] ^ b[i] ^ c1[i];
    assign c1[i+1] = (a[i] & b[i]) | (c1[i] & (a[i] ^ b[i]));
  end

  // Carry-select multiplexers.
  assign sum  = cin ? s1 : s0;
  assign cout = cin ? c1[W] : c0[W];

  // Predicted complement of the carry-in-1 rail.
  assign d[0]    = 1'b1;
  assign s1_n[0] = s0[0];
  for (genvar i = 1; i < W; i++) begin : g_pred
    if (i == 1) begin : g_first
      assign d[i] = s0[0];
    end else begin : g_chain
      assign d[i] = d[i-1] & s0[i-1];
    end
    assign s1_n[i] = ~(s0[i] ^ d[i]);
  end

  // Checker tree: a linear cascade of W-1 two-pair two-rail checkers.
  logic [W-1:0] t1, t2;
  assign t1[0] = s1[0];
  assign t2[0] = s1_n[0];
  for (genvar i = 1; i < W; i++) begin : g_chk
    two_rail_checker u_chk (
      .a1(t1[i-1]), .a0(t2[i-1]),
      .b1(s1[i]),   .b0(s1_n[i]),
      .z1(t1[i]),   .z2(t2[i])
    );
  end
  assign z1  = t1[W-1];
  assign z2  = t2[W-1];
  assign err = ~(z1 ^ z2);
endmodule
