// Two-pair two-rail checker.
//
// Takes two signals in two-rail form, (a1,a0) and (b1,b0), each pair being
// complementary when fault free, and compresses them into one pair (z1,z2)
// that is again complementary when both inputs are:
//   z1 = a1&b1 | a0&b0,   z2 = a1&b0 | a0&b1.
// If either input pair is not complementary (00 or 11), the output pair is not
// complementary either, so a tree of these checkers reduces any number of
// two-rail pairs to a single pair whose equality flags an error.
// Purely combinational. The gate equations are the standard two-rail checker;
// the surrounding adder only names the block.
module two_rail_checker (
  input  logic a1,
  input  logic a0,
  input  logic b1,
  input  logic b0,
  output logic z1,
  output logic z2
);
  assign z1 = (a1 & b1) | (a0 & b0);
  assign z2 = (a1 & b0) | (a0 & b1);
endmodule
