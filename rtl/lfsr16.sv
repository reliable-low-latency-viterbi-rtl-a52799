// 16-bit linear feedback shift register for pseudo-random test patterns.
//
// Fibonacci form of the polynomial x^16 + x^13 + x^11 + 1: each enabled clock
// shifts the register left by one and feeds in q[15] ^ q[12] ^ q[10] at bit 0.
// It supplies the operand patterns for fault-injection runs of the protected
// units. Reset (asynchronous, active low) and the load input set the state to
// a seed, which must be non-zero. Note that this polynomial has an even number
// of terms, so it is not primitive: the sequence is shorter than 2^16-1 and
// depends on the seed. The polynomial is the published one; the shift
// direction, the seed and the load port are this design's choice.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        load,
  input  logic [15:0] load_val,
  output logic [15:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= load_val;
    else if (en)   q <= {q[14:0], q[15] ^ q[12] ^ q[10]};
  end
endmodule
