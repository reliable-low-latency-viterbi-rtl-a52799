// Error-detecting compare-select-add stage of a look-ahead Viterbi decoder,
// with its protected decision/survivor memories.
//
// One operand stream (two competing path metrics lam_p1/lam_p2 and two branch
// metrics lam_j/lam_k, each with its L-bit signature) feeds, side by side, every
// protected variant of the compare-select-add operation
//   out_j = max(lam_p1, lam_p2) + lam_j,   out_k = max(lam_p1, lam_p2) + lam_k:
//   * csa_sig / pcsa_sig      - signature (parity) checked registers,
//                               duplicated multiplexers, self-checking adders;
//   * csa_reco / pcsa_reco    - recomputing with encoded operands, one
//                               instance per encoding (index 0 RESO, 1 RERO,
//                               2 modified RESO), all driven by one reco_sched.
// RSIG = 1 turns the recomputing units into the combined scheme (register
// signatures and duplicated muxes on top of recomputing).
// All instances compute the same results, so they can be compared against
// each other; each raises its own error flag.
// An operand set is taken when in_valid && in_ready; in_ready follows the
// recompute scheduler (one set every two cycles when G = 1). With bist_en the
// operands come instead from a 16-bit LFSR (x^16+x^13+x^11+1) and their
// signatures are generated here.
// Two signature-protected memories stand beside the datapath with their own
// ports: dec_* (branch-metric decisions; one parity bit per 4-bit word,
// 8 x 16 entries, with the reinforcing parity copy) and smu_* (survivor path
// memory; odd/even interleaved parity, 8 x 8 entries).
// Latencies: sig units 2 cycles from acceptance; reco units 2 cycles after the
// rerun is issued (the rerun follows acceptance by G cycles plus the issue
// register). Which variants stand together here, the LFSR hookup and the
// stream protocol are this design's choices.
module viterbi_ed_top
  import vit_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned K   = 2,
  parameter int unsigned L   = 1,
  parameter int unsigned G   = 1,
  parameter int unsigned MDW = 4,
  parameter bit          RSIG = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // operand stream
  input  logic               bist_en,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [N-1:0]       lam_p1,
  input  logic [L-1:0]       lam_p1_sig,
  input  logic [N-1:0]       lam_p2,
  input  logic [L-1:0]       lam_p2_sig,
  input  logic [N-1:0]       lam_j,
  input  logic [L-1:0]       lam_j_sig,
  input  logic [N-1:0]       lam_k,
  input  logic [L-1:0]       lam_k_sig,
  // signature-protected units
  output logic               csa_sig_valid,
  output logic [N-1:0]       csa_sig_j,
  output logic [N-1:0]       csa_sig_k,
  output logic               csa_error,
  output logic               pcsa_sig_valid,
  output logic [N-1:0]       pcsa_sig_j,
  output logic [N-1:0]       pcsa_sig_k,
  output logic               pcsa_error,
  // recomputing units, [0] RESO, [1] RERO, [2] modified RESO
  output logic [2:0]         csa_reco_valid,
  output logic [2:0][N-1:0]  csa_reco_j,
  output logic [2:0][N-1:0]  csa_reco_k,
  output logic [2:0]         csa_reco_err,
  output logic [2:0]         pcsa_reco_valid,
  output logic [2:0][N-1:0]  pcsa_reco_j,
  output logic [2:0][N-1:0]  pcsa_reco_k,
  output logic [2:0]         pcsa_reco_err,
  // decision memory (parity, 3-bit row, 4-bit column)
  input  logic               dec_we,
  input  logic [2:0]         dec_wy,
  input  logic [3:0]         dec_wx,
  input  logic [MDW-1:0]     dec_wd,
  input  logic               dec_re,
  input  logic [2:0]         dec_ry,
  input  logic [3:0]         dec_rx,
  output logic               dec_rd_valid,
  output logic [MDW-1:0]     dec_rd_data,
  output logic               dec_rd_err,
  // survivor memory (interleaved parity, 3-bit row, 3-bit column)
  input  logic               smu_we,
  input  logic [2:0]         smu_wy,
  input  logic [2:0]         smu_wx,
  input  logic [MDW-1:0]     smu_wd,
  input  logic               smu_re,
  input  logic [2:0]         smu_ry,
  input  logic [2:0]         smu_rx,
  output logic               smu_rd_valid,
  output logic [MDW-1:0]     smu_rd_data,
  output logic               smu_rd_err
);
  // ---------------- operand source ----------------
  logic [15:0] lq;
  logic        take;
  lfsr16 u_lfsr (
    .clk, .rst_n, .en(bist_en & take), .load(1'b0), .load_val(16'h0), .q(lq)
  );

  // Each operand is a differently rotated view of the LFSR state.
  logic [N-1:0] b_p1, b_p2, b_j, b_k;
  logic [47:0]  lq3;
  assign lq3  = {lq, lq, lq};
  assign b_p1 = N'(lq3 >> 0);
  assign b_p2 = N'(lq3 >> 4);
  assign b_j  = N'(lq3 >> 8);
  assign b_k  = N'(lq3 >> 12);

  logic [L-1:0] bs_p1, bs_p2, bs_j, bs_k;
  sig_gen #(.W(N), .L(L)) u_bs_p1 (.d(b_p1), .s(bs_p1));
  sig_gen #(.W(N), .L(L)) u_bs_p2 (.d(b_p2), .s(bs_p2));
  sig_gen #(.W(N), .L(L)) u_bs_j  (.d(b_j),  .s(bs_j));
  sig_gen #(.W(N), .L(L)) u_bs_k  (.d(b_k),  .s(bs_k));

  logic         s_valid;
  logic [N-1:0] s_p1, s_p2, s_j, s_k;
  logic [L-1:0] ss_p1, ss_p2, ss_j, ss_k;
  assign s_valid = bist_en | in_valid;
  assign s_p1  = bist_en ? b_p1  : lam_p1;
  assign s_p2  = bist_en ? b_p2  : lam_p2;
  assign s_j   = bist_en ? b_j   : lam_j;
  assign s_k   = bist_en ? b_k   : lam_k;
  assign ss_p1 = bist_en ? bs_p1 : lam_p1_sig;
  assign ss_p2 = bist_en ? bs_p2 : lam_p2_sig;
  assign ss_j  = bist_en ? bs_j  : lam_j_sig;
  assign ss_k  = bist_en ? bs_k  : lam_k_sig;

  logic sched_ready;
  assign take     = s_valid & sched_ready;
  assign in_ready = sched_ready & ~bist_en;

  // ---------------- signature-protected units ----------------
  logic [L-1:0] csj_s, csk_s, psj_s, psk_s;
  csa_sig #(.N(N), .L(L)) u_csa_sig (
    .clk, .rst_n, .in_valid(take),
    .lam_p1(s_p1), .lam_p1_sig(ss_p1), .lam_p2(s_p2), .lam_p2_sig(ss_p2),
    .lam_j(s_j), .lam_j_sig(ss_j), .lam_k(s_k), .lam_k_sig(ss_k),
    .out_valid(csa_sig_valid), .out_j(csa_sig_j), .out_j_sig(csj_s),
    .out_k(csa_sig_k), .out_k_sig(csk_s), .csa_error(csa_error)
  );
  pcsa_sig #(.N(N), .L(L)) u_pcsa_sig (
    .clk, .rst_n, .in_valid(take),
    .lam_p1(s_p1), .lam_p1_sig(ss_p1), .lam_p2(s_p2), .lam_p2_sig(ss_p2),
    .lam_j(s_j), .lam_j_sig(ss_j), .lam_k(s_k), .lam_k_sig(ss_k),
    .out_valid(pcsa_sig_valid), .out_j(pcsa_sig_j), .out_j_sig(psj_s),
    .out_k(pcsa_sig_k), .out_k_sig(psk_s), .pcsa_error(pcsa_error)
  );

  // ---------------- recomputing units ----------------
  logic         iss_valid, iss_enc;
  logic [4*N-1:0] iss_data;
  reco_sched #(.DW(4 * N), .G(G)) u_sched (
    .clk, .rst_n, .in_valid(s_valid), .in_ready(sched_ready),
    .in_data({s_p1, s_p2, s_j, s_k}),
    .iss_valid, .iss_enc, .iss_data
  );

  localparam reco_mode_t MODES [3] = '{RESO, RERO, M_RESO};
  for (genvar m = 0; m < 3; m++) begin : g_mode
    csa_reco #(.N(N), .K(K), .MODE(MODES[m]), .G(G), .SIG(RSIG)) u_csa (
      .clk, .rst_n, .in_valid(iss_valid), .in_enc(iss_enc),
      .lam_p1(iss_data[3*N +: N]), .lam_p2(iss_data[2*N +: N]),
      .lam_j(iss_data[N +: N]),    .lam_k(iss_data[0 +: N]),
      .out_valid(csa_reco_valid[m]), .out_j(csa_reco_j[m]),
      .out_k(csa_reco_k[m]), .err(csa_reco_err[m])
    );
    pcsa_reco #(.N(N), .K(K), .MODE(MODES[m]), .G(G), .SIG(RSIG)) u_pcsa (
      .clk, .rst_n, .in_valid(iss_valid), .in_enc(iss_enc),
      .lam_p1(iss_data[3*N +: N]), .lam_p2(iss_data[2*N +: N]),
      .lam_j(iss_data[N +: N]),    .lam_k(iss_data[0 +: N]),
      .out_valid(pcsa_reco_valid[m]), .out_j(pcsa_reco_j[m]),
      .out_k(pcsa_reco_k[m]), .err(pcsa_reco_err[m])
    );
  end

  // ---------------- protected memories ----------------
  logic       dec_sig_unused;
  logic [1:0] smu_sig_unused;
  sig_mem #(.DW(MDW), .AYW(3), .AXW(4), .L(1), .REINF(1'b1)) u_dec_mem (
    .clk, .rst_n, .we(dec_we), .wy(dec_wy), .wx(dec_wx), .wd(dec_wd),
    .re(dec_re), .ry(dec_ry), .rx(dec_rx), .rd_valid(dec_rd_valid),
    .rd_data(dec_rd_data), .rd_sig(dec_sig_unused), .rd_err(dec_rd_err)
  );
  sig_mem #(.DW(MDW), .AYW(3), .AXW(3), .L(2), .REINF(1'b1)) u_smu_mem (
    .clk, .rst_n, .we(smu_we), .wy(smu_wy), .wx(smu_wx), .wd(smu_wd),
    .re(smu_re), .ry(smu_ry), .rx(smu_rx), .rd_valid(smu_rd_valid),
    .rd_data(smu_rd_data), .rd_sig(smu_sig_unused), .rd_err(smu_rd_err)
  );

  // Output signatures of the sig units are re-checked inside them.
  logic unused;
  assign unused = ^{csj_s, csk_s, psj_s, psk_s, dec_sig_unused, smu_sig_unused};
endmodule
