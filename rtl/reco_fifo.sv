// Small first-in first-out buffer that holds the 1st-run values of a
// recomputing unit until the 2nd run of the same operands arrives.
//
// Depth G equals the number of operand sets the scheduler issues in a row
// before their encoded reruns (G = 1 for the N1 E1 N2 E2 order, G = 2 for
// N1 N2 E1 E2). push writes din; pop drops the head; dout always shows the
// head. Registers only, reset to empty. Assertions flag a push when full and a
// pop when empty, either of which means the run order was broken.
module reco_fifo #(
  parameter int unsigned W = 8,
  parameter int unsigned G = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (G > 1) ? $clog2(G) : 1;

  logic [W-1:0]  mem [G];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < G; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (32'(wp) == G - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == G - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign dout = mem[rp];

  // Run-order rules, checked on every clock edge.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_overflow:  assert (!push || pop || 32'(cnt) < G)
        else $error("reco_fifo: 1st-run value pushed into a full buffer");
      a_no_underflow: assert (!pop || cnt != 0)
        else $error("reco_fifo: rerun without a buffered 1st run");
    end
  end
endmodule
