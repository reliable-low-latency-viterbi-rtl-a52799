// Signature-protected compare-select-add (CSA) unit.
//
// Function: of the two competing path metrics lam_p1 and lam_p2 (the two
// parallel paths into a state of the look-ahead trellis) the larger survives,
// and it is extended by the two branch metrics lam_j and lam_k:
//   out_j = max(lam_p1, lam_p2) + lam_j,   out_k = max(lam_p1, lam_p2) + lam_k
// (modulo 2^N). A subtractor compares the two path metrics and its borrow
// drives the select multiplexer; the two adders follow (compare first, then
// add).
//
// Error detection, all feeding one OR gate whose output is csa_error:
//  * every register carries an L-bit signature (L = 1: parity) next to its
//    data; each register's content is re-checked against its signature;
//  * the select multiplexer is duplicated and the two outputs are XOR-compared;
//  * both adders are self-checking carry-select adders (two-rail checkers).
//
// Timing: when in_valid is high the four input registers load (data and the
// signatures delivered with them by the previous stage). The next clock loads
// the two output registers, with freshly generated signatures, and raises
// out_valid. csa_error is combinational from the registers: it reports faults
// seen in the registers and in the operation currently between them.
// Keeping the larger metric, the widths and the valid protocol are choices of
// this design; the structure of checks follows the published unit.
module csa_sig #(
  parameter int unsigned N = 8,
  parameter int unsigned L = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] lam_p1,
  input  logic [L-1:0] lam_p1_sig,
  input  logic [N-1:0] lam_p2,
  input  logic [L-1:0] lam_p2_sig,
  input  logic [N-1:0] lam_j,
  input  logic [L-1:0] lam_j_sig,
  input  logic [N-1:0] lam_k,
  input  logic [L-1:0] lam_k_sig,
  output logic         out_valid,
  output logic [N-1:0] out_j,
  output logic [L-1:0] out_j_sig,
  output logic [N-1:0] out_k,
  output logic [L-1:0] out_k_sig,
  output logic         csa_error
);
  // Input registers with their signatures.
  logic [N-1:0] r_p1, r_p2, r_j, r_k;
  logic [L-1:0] r_p1_s, r_p2_s, r_j_s, r_k_s;
  logic         r_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_p1 <= '0; r_p2 <= '0; r_j <= '0; r_k <= '0;
      r_p1_s <= '0; r_p2_s <= '0; r_j_s <= '0; r_k_s <= '0;
      r_valid <= 1'b0;
    end else begin
      r_valid <= in_valid;
      if (in_valid) begin
        r_p1 <= lam_p1; r_p1_s <= lam_p1_sig;
        r_p2 <= lam_p2; r_p2_s <= lam_p2_sig;
        r_j  <= lam_j;  r_j_s  <= lam_j_sig;
        r_k  <= lam_k;  r_k_s  <= lam_k_sig;
      end
    end
  end

  // Compare: subtractor borrow is 1 when lam_p2 is the larger metric.
  logic [N:0]   diff;
  logic         sel;
  logic [N-1:0] m_sel, m_dup;
  assign diff  = {1'b0, r_p1} - {1'b0, r_p2};
  assign sel   = diff[N];
  assign m_sel = sel ? r_p2 : r_p1;
  assign m_dup = sel ? r_p2 : r_p1;   // duplicated multiplexer

  // Add: two self-checking carry-select adders.
  logic [N-1:0] sum_j, sum_k;
  logic         co_j, co_k, z1_j, z2_j, z1_k, z2_k, ae_j, ae_k;
  sc_csel_adder #(.W(N)) u_add_j (
    .a(m_sel), .b(r_j), .cin(1'b0), .sum(sum_j), .cout(co_j),
    .z1(z1_j), .z2(z2_j), .err(ae_j)
  );
  sc_csel_adder #(.W(N)) u_add_k (
    .a(m_sel), .b(r_k), .cin(1'b0), .sum(sum_k), .cout(co_k),
    .z1(z1_k), .z2(z2_k), .err(ae_k)
  );

  // Output registers; their signatures are generated from the adder outputs.
  logic [L-1:0] sg_j, sg_k;
  sig_gen #(.W(N), .L(L)) u_sg_j (.d(sum_j), .s(sg_j));
  sig_gen #(.W(N), .L(L)) u_sg_k (.d(sum_k), .s(sg_k));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_j <= '0; out_k <= '0; out_j_sig <= '0; out_k_sig <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= r_valid;
      if (r_valid) begin
        out_j <= sum_j; out_j_sig <= sg_j;
        out_k <= sum_k; out_k_sig <= sg_k;
      end
    end
  end

  // Signature checks of all six registers.
  logic [L-1:0] c_p1, c_p2, c_j, c_k, c_oj, c_ok;
  sig_gen #(.W(N), .L(L)) u_c_p1 (.d(r_p1),  .s(c_p1));
  sig_gen #(.W(N), .L(L)) u_c_p2 (.d(r_p2),  .s(c_p2));
  sig_gen #(.W(N), .L(L)) u_c_j  (.d(r_j),   .s(c_j));
  sig_gen #(.W(N), .L(L)) u_c_k  (.d(r_k),   .s(c_k));
  sig_gen #(.W(N), .L(L)) u_c_oj (.d(out_j), .s(c_oj));
  sig_gen #(.W(N), .L(L)) u_c_ok (.d(out_k), .s(c_ok));

  logic reg_err, mux_err, add_err;
  assign reg_err = (|(c_p1 ^ r_p1_s)) | (|(c_p2 ^ r_p2_s)) |
                   (|(c_j ^ r_j_s))   | (|(c_k ^ r_k_s))   |
                   (|(c_oj ^ out_j_sig)) | (|(c_ok ^ out_k_sig));
  assign mux_err = |(m_sel ^ m_dup);
  // The adder checkers only judge an operation that is actually in flight.
  assign add_err = r_valid & (ae_j | ae_k);
  assign csa_error = reg_err | mux_err | add_err;

  // The carry-outs are dropped: path metrics wrap modulo 2^N.
  logic unused;
  assign unused = ^{co_j, co_k, z1_j, z2_j, z1_k, z2_k, diff[N-1:0]};
endmodule
