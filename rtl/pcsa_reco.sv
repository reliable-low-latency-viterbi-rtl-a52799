// Precomputed compare-select-add (PCSA) unit protected by recomputing with
// encoded operands.
//
// Function (per operand set, modulo 2^N):
//   out_j = max(lam_p1, lam_p2) + lam_j,   out_k = max(lam_p1, lam_p2) + lam_k
// computed the PCSA way: four adders form lam_p1+lam_j, lam_p2+lam_j,
// lam_p1+lam_k and lam_p2+lam_k in parallel with the subtractor that compares
// lam_p1 and lam_p2; two multiplexers then pick the sums of the larger metric.
// Every operand set is computed twice, the 2nd time on encoded operands
// (MODE = RESO: shifted left by K into N+K bits; RERO: rotated left by K in
// N+1 bits; M_RESO: shifted left by K inside N bits), and the decoded 2nd-run
// results are compared with the 1st-run results; a difference raises err.
//
// Pipeline (two stages):
//   stage 1: encode muxes -> subtractor and four adders -> register
//   stage 2: two select muxes -> demux: 1st run into a G-deep buffer,
//            2nd run decoded and compared with the buffered 1st run -> register
// Inputs: one run per cycle on in_valid, in_enc = 0 for a 1st run and 1 for a
// 2nd run, in the reco_sched order. out_valid pulses two cycles after each 2nd
// run enters, with the 1st-run results and err.
//
// As in the CSA unit, modified RESO reuses the 1st-run select decision in the
// rerun and checks the N-K surviving subtractor difference bits instead; that,
// keeping the larger metric, and the buffer are choices of this design.
//
// SIG = 1 builds the combined scheme, recomputing plus signatures: each of the
// four stage-1 sum registers stores a parity bit formed from its input, the
// select bit is registered twice, and both select muxes are duplicated and
// compared. A 1st-run signature alarm waits in the buffer and is ORed into
// the set's err. Which parts carry signatures is this design's choice.
module pcsa_reco
  import vit_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 2,
  parameter reco_mode_t  MODE = RERO,
  parameter int unsigned G    = 1,
  parameter bit          SIG  = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_enc,
  input  logic [N-1:0] lam_p1,
  input  logic [N-1:0] lam_p2,
  input  logic [N-1:0] lam_j,
  input  logic [N-1:0] lam_k,
  output logic         out_valid,
  output logic [N-1:0] out_j,
  output logic [N-1:0] out_k,
  output logic         err
);
  localparam int unsigned P   = reco_width(MODE, N, K);
  localparam bit          ROT = (MODE == RERO);

  // ---------------- stage 1: encode, compare, precompute ----------------
  logic [P-1:0] e_p1, e_p2, e_j, e_k;
  reco_enc #(.N(N), .K(K), .MODE(MODE)) u_enc_p1 (.x(lam_p1), .enc(in_enc), .y(e_p1));
  reco_enc #(.N(N), .K(K), .MODE(MODE)) u_enc_p2 (.x(lam_p2), .enc(in_enc), .y(e_p2));
  reco_enc #(.N(N), .K(K), .MODE(MODE)) u_enc_j  (.x(lam_j),  .enc(in_enc), .y(e_j));
  reco_enc #(.N(N), .K(K), .MODE(MODE)) u_enc_k  (.x(lam_k),  .enc(in_enc), .y(e_k));

  // Subtractor lam_p1 - lam_p2 as lam_p1 + ~lam_p2 + 1.
  logic [P-1:0] diff;
  logic         d_cout;
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_sub (
    .a(e_p1), .b(~e_p2), .cin(1'b1), .enc(in_enc), .s(diff), .cout(d_cout)
  );

  // Borrow of this run: 1 when lam_p2 is the larger metric.
  logic borrow;
  always_comb begin
    if (MODE == RERO) borrow = in_enc ? diff[K-1] : diff[N];   // guard bit
    else              borrow = ~d_cout;
  end

  // Modified RESO: keep the 1st-run decision and difference for the rerun.
  logic         sel, d_err;
  logic [P:0]   sd_head;
  if (MODE == M_RESO) begin : g_mreso
    logic d_mis;
    reco_fifo #(.W(P + 1), .G(G)) u_sd (
      .clk, .rst_n,
      .push(in_valid & ~in_enc), .din({borrow, diff}),
      .pop(in_valid & in_enc),   .dout(sd_head)
    );
    reco_cmp #(.N(N), .K(K), .MODE(MODE)) u_dcmp (
      .r1(sd_head[P-1:0]), .r2(diff), .mismatch(d_mis)
    );
    assign sel   = in_enc ? sd_head[P] : borrow;
    assign d_err = in_enc & d_mis;
  end else begin : g_recompute
    assign sd_head = '0;
    assign sel     = borrow;
    assign d_err   = 1'b0;
  end

  // Four precomputing adders.
  logic [P-1:0] a1j, a2j, a1k, a2k;
  logic [3:0]   co;
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_add_1j (
    .a(e_p1), .b(e_j), .cin(1'b0), .enc(in_enc), .s(a1j), .cout(co[0]));
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_add_2j (
    .a(e_p2), .b(e_j), .cin(1'b0), .enc(in_enc), .s(a2j), .cout(co[1]));
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_add_1k (
    .a(e_p1), .b(e_k), .cin(1'b0), .enc(in_enc), .s(a1k), .cout(co[2]));
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_add_2k (
    .a(e_p2), .b(e_k), .cin(1'b0), .enc(in_enc), .s(a2k), .cout(co[3]));

  logic         q_valid, q_enc, q_derr, q_sel;
  logic [P-1:0] q_1j, q_2j, q_1k, q_2k;
  // Combined scheme (SIG = 1): a parity bit per stage-1 word, formed from
  // its input, and a copy of the select bit.
  logic         q_p1j, q_p2j, q_p1k, q_p2k, q_sel_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0; q_enc <= 1'b0; q_derr <= 1'b0; q_sel <= 1'b0;
      q_1j <= '0; q_2j <= '0; q_1k <= '0; q_2k <= '0;
      q_p1j <= 1'b0; q_p2j <= 1'b0; q_p1k <= 1'b0; q_p2k <= 1'b0; q_sel_c <= 1'b0;
    end else begin
      q_valid <= in_valid;
      q_enc   <= in_enc;
      q_derr  <= d_err;
      q_sel   <= sel;
      q_1j    <= a1j;
      q_2j    <= a2j;
      q_1k    <= a1k;
      q_2k    <= a2k;
      q_p1j   <= ^a1j;
      q_p2j   <= ^a2j;
      q_p1k   <= ^a1k;
      q_p2k   <= ^a2k;
      q_sel_c <= sel;
    end
  end

  // ---------------- stage 2: select, demux, check ----------------
  logic [P-1:0] sum_j, sum_k;
  assign sum_j = q_sel ? q_2j : q_1j;
  assign sum_k = q_sel ? q_2k : q_1k;

  // Combined scheme: duplicated select muxes and the register signatures.
  logic [P-1:0] dup_j, dup_k;
  logic         s_err;
  assign dup_j = q_sel_c ? q_2j : q_1j;
  assign dup_k = q_sel_c ? q_2k : q_1k;
  assign s_err = SIG && ((dup_j != sum_j) | (dup_k != sum_k) |
                         (^q_1j ^ q_p1j) | (^q_2j ^ q_p2j) |
                         (^q_1k ^ q_p1k) | (^q_2k ^ q_p2k));

  logic [2*P:0] first;
  reco_fifo #(.W(2 * P + 1), .G(G)) u_first (
    .clk, .rst_n,
    .push(q_valid & ~q_enc), .din({s_err, sum_j, sum_k}),
    .pop(q_valid & q_enc),   .dout(first)
  );

  logic mis_j, mis_k;
  reco_cmp #(.N(N), .K(K), .MODE(MODE)) u_cmp_j (
    .r1(first[2*P-1:P]), .r2(sum_j), .mismatch(mis_j)
  );
  reco_cmp #(.N(N), .K(K), .MODE(MODE)) u_cmp_k (
    .r1(first[P-1:0]), .r2(sum_k), .mismatch(mis_k)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_j <= '0; out_k <= '0; err <= 1'b0;
    end else begin
      out_valid <= q_valid & q_enc;
      if (q_valid & q_enc) begin
        out_j <= first[P+N-1:P];
        out_k <= first[N-1:0];
        err   <= mis_j | mis_k | q_derr | first[2*P] | s_err;
      end
    end
  end

  logic unused;
  assign unused = ^{co, sd_head};
endmodule
