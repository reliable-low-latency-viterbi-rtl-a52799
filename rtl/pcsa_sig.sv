// Signature-protected precomputed compare-select-add (PCSA) unit.
//
// Same function as the CSA unit,
//   out_j = max(lam_p1, lam_p2) + lam_j,   out_k = max(lam_p1, lam_p2) + lam_k
// (modulo 2^N), but reordered for speed: four adders form all four candidate
// sums lam_p1+lam_j, lam_p2+lam_j, lam_p1+lam_k, lam_p2+lam_k while the
// subtractor compares lam_p1 with lam_p2, and its borrow then drives two
// select multiplexers. The compare is thus in parallel with the adds.
//
// Error detection, all feeding one OR gate whose output is ppcsa_error:
//  * every register carries an L-bit signature (L = 1: parity) next to its
//    data; each register's content is re-checked against its signature;
//  * both select multiplexers are duplicated and XOR-compared with their copy;
//  * all four adders are self-checking carry-select adders.
//
// Timing: when in_valid is high the four input registers load (data and the
// signatures delivered with them by the previous stage). The next clock loads
// the two output registers, with freshly generated signatures, and raises
// out_valid. pcsa_error is combinational from the registers: it reports faults
// seen in the registers and in the operation currently between them.
// Keeping the larger metric, the widths and the valid protocol are choices of
// this design; the structure of checks follows the published unit.
module pcsa_sig #(
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
  output logic         pcsa_error
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

  // Compare.
  logic [N:0] diff;
  logic       sel;
  assign diff = {1'b0, r_p1} - {1'b0, r_p2};
  assign sel  = diff[N];

  // Precompute: four self-checking carry-select adders.
  logic [N-1:0] s1j, s2j, s1k, s2k;
  logic [3:0]   co, z1, z2, ae;
  sc_csel_adder #(.W(N)) u_add_1j (.a(r_p1), .b(r_j), .cin(1'b0), .sum(s1j),
    .cout(co[0]), .z1(z1[0]), .z2(z2[0]), .err(ae[0]));
  sc_csel_adder #(.W(N)) u_add_2j (.a(r_p2), .b(r_j), .cin(1'b0), .sum(s2j),
    .cout(co[1]), .z1(z1[1]), .z2(z2[1]), .err(ae[1]));
  sc_csel_adder #(.W(N)) u_add_1k (.a(r_p1), .b(r_k), .cin(1'b0), .sum(s1k),
    .cout(co[2]), .z1(z1[2]), .z2(z2[2]), .err(ae[2]));
  sc_csel_adder #(.W(N)) u_add_2k (.a(r_p2), .b(r_k), .cin(1'b0), .sum(s2k),
    .cout(co[3]), .z1(z1[3]), .z2(z2[3]), .err(ae[3]));

  // Select: two multiplexers, each with a duplicate.
  logic [N-1:0] sum_j, sum_k, dup_j, dup_k;
  assign sum_j = sel ? s2j : s1j;
  assign dup_j = sel ? s2j : s1j;
  assign sum_k = sel ? s2k : s1k;
  assign dup_k = sel ? s2k : s1k;

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
  assign mux_err = (|(sum_j ^ dup_j)) | (|(sum_k ^ dup_k));
  // The adder checkers only judge an operation that is actually in flight.
  assign add_err = r_valid & (|ae);
  assign pcsa_error = reg_err | mux_err | add_err;

  // The carry-outs are dropped: path metrics wrap modulo 2^N.
  logic unused;
  assign unused = ^{co, z1, z2, diff[N-1:0]};
endmodule
