// Compare-select-add (CSA) unit protected by recomputing with encoded operands.
//
// Function (per operand set, modulo 2^N):
//   out_j = max(lam_p1, lam_p2) + lam_j,   out_k = max(lam_p1, lam_p2) + lam_k
// Every operand set is computed twice: the 1st run on the operands as they
// are, the 2nd run on encoded operands (MODE = RESO: shifted left by K into an
// N+K-bit datapath; RERO: rotated left by K in an N+1-bit datapath; M_RESO:
// shifted left by K inside the N-bit datapath, losing the top K bits). The
// 2nd-run results are decoded and compared with the 1st-run results; any
// difference raises err for that operand set. A permanent fault hits
// different bit positions of the two runs and so shows up as a mismatch.
//
// Pipeline (two stages, so a rerun costs no stall when runs are interleaved):
//   stage 1: encode muxes -> subtractor -> select mux  -> register
//   stage 2: two adders -> demux: 1st run into a G-deep buffer,
//            2nd run decoded and compared with the buffered 1st run -> register
// Inputs: one run per cycle on in_valid, in_enc = 0 for a 1st run and 1 for a
// 2nd run; the runs must follow the reco_sched order (G 1st runs, then their G
// reruns in the same order). Outputs: out_valid pulses two cycles after each
// 2nd run enters, with the 1st-run results out_j/out_k and err.
//
// Modified RESO loses the upper K bits of the compared metrics, so the
// recomputed subtractor borrow cannot be trusted there: in that mode the 2nd
// run reuses the 1st-run select decision and the subtractor is checked by
// comparing its N-K surviving difference bits instead. That, keeping the
// larger metric, and the buffer are choices of this design; the run structure
// and the three encodings follow the published unit.
//
// SIG = 1 builds the combined scheme, recomputing plus signatures: the select
// mux is duplicated and compared, and each stage-1 data register stores a
// parity bit formed from its input and checked at its output. A signature
// alarm from the 1st run waits in the buffer and is reported, ORed into err,
// with the set's result. Combining the two is evaluated in the published work;
// which parts carry signatures here is this design's choice.
module csa_reco
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

  // ---------------- stage 1: encode, compare, select ----------------
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

  logic [P-1:0] m_sel;
  assign m_sel = sel ? e_p2 : e_p1;

  // Combined scheme (SIG = 1): the select mux is duplicated and compared, and
  // every stage-1 data register carries a parity bit formed from its input.
  logic [P-1:0] m_dup;
  logic         mux_err;
  assign m_dup   = sel ? e_p2 : e_p1;
  assign mux_err = SIG && (m_dup != m_sel);

  logic         q_valid, q_enc, q_derr;
  logic [P-1:0] q_m, q_j, q_k;
  logic         q_merr, q_pm, q_pj, q_pk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0; q_enc <= 1'b0; q_derr <= 1'b0;
      q_m <= '0; q_j <= '0; q_k <= '0;
      q_merr <= 1'b0; q_pm <= 1'b0; q_pj <= 1'b0; q_pk <= 1'b0;
    end else begin
      q_valid <= in_valid;
      q_enc   <= in_enc;
      q_derr  <= d_err;
      q_m     <= m_sel;
      q_j     <= e_j;
      q_k     <= e_k;
      q_merr  <= mux_err;
      q_pm    <= ^m_sel;
      q_pj    <= ^e_j;
      q_pk    <= ^e_k;
    end
  end

  // ---------------- stage 2: add, demux, check ----------------
  logic [P-1:0] sum_j, sum_k;
  logic         co_j, co_k;
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_add_j (
    .a(q_m), .b(q_j), .cin(1'b0), .enc(q_enc), .s(sum_j), .cout(co_j)
  );
  rr_adder #(.W(P), .K(K), .ROT(ROT)) u_add_k (
    .a(q_m), .b(q_k), .cin(1'b0), .enc(q_enc), .s(sum_k), .cout(co_k)
  );

  // Signature check of this run; a 1st-run alarm waits in the buffer.
  logic s_err;
  assign s_err = SIG && (q_merr | (^q_m ^ q_pm) | (^q_j ^ q_pj) | (^q_k ^ q_pk));

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
  assign unused = ^{co_j, co_k, sd_head};
endmodule
