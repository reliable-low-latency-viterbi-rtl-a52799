// Stuck-at fault-injection campaign on the recomputing CSA and PCSA units
// (RESO, RERO and modified RESO, 8-bit metrics, K = 2, run order N1 E1 N2 E2).
// Operands come from the 16-bit LFSR (x^16 + x^13 + x^11 + 1). For each trial
// a fresh operand set is run twice (normal, then encoded) while a permanent
// stuck-at fault of 1, 2, 3, 4 or 1..8 random bits ("multiple") sits in the
// stage-1 pipeline registers of each unit (CSA: selected metric and both
// branch metrics; PCSA: the four precomputed sums). Each unit is also run in
// its combined form (register signatures added, SIG = 1). A trial counts as
//   corrupting - the delivered result differs from the fault-free result,
//   detected   - err is raised,
//   escape     - corrupting but not detected.
// One trial in eleven is fault free and must give the right result with no
// error. The printed table gives detected/injected and the escapes; a
// failure is counted for any false alarm, wrong fault-free result, or a
// unit whose detected share of corrupting faults is below 98 % (RESO, RERO)
// or 80 % (modified RESO, which compares only N-K result bits); the combined
// units are held to 99.9 % and 99 %.
module tb_fault_campaign;
  import vit_pkg::*;
  localparam int N = 8;
  localparam int TRIALS = 500000;         // faulty trials per fault class
  localparam int ALL    = TRIALS + TRIALS / 10;   // plus one fault-free trial in 11
  localparam reco_mode_t MODES [3] = '{RESO, RERO, M_RESO};

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         v, e;
  logic [N-1:0] p1, p2, j, k;
  logic [15:0]  lq;
  logic         lfsr_en;
  lfsr16 u_lfsr (.clk, .rst_n, .en(lfsr_en), .load(1'b0), .load_val(16'h0), .q(lq));

  // per unit u = 0..2 CSA (RESO, RERO, M_RESO), 3..5 PCSA
  // 6..8 CSA and 9..11 PCSA with register signatures added (combined scheme)
  localparam int NU = 12;
  logic         ov [NU], er [NU];
  logic [N-1:0] oj [NU], ok [NU];
  logic         inj;                 // fault active in this trial
  logic [31:0]  fmask [NU][4];       // stuck bits per target register
  logic [31:0]  fval  [NU][4];       // stuck values

  for (genvar m = 0; m < 3; m++) begin : g_m
    localparam int P = reco_width(MODES[m], N, 2);
    csa_reco #(.N(N), .K(2), .MODE(MODES[m]), .G(1)) u_c (
      .clk, .rst_n, .in_valid(v), .in_enc(e), .lam_p1(p1), .lam_p2(p2),
      .lam_j(j), .lam_k(k), .out_valid(ov[m]), .out_j(oj[m]), .out_k(ok[m]), .err(er[m]));
    pcsa_reco #(.N(N), .K(2), .MODE(MODES[m]), .G(1)) u_p (
      .clk, .rst_n, .in_valid(v), .in_enc(e), .lam_p1(p1), .lam_p2(p2),
      .lam_j(j), .lam_k(k), .out_valid(ov[3+m]), .out_j(oj[3+m]), .out_k(ok[3+m]), .err(er[3+m]));
    csa_reco #(.N(N), .K(2), .MODE(MODES[m]), .G(1), .SIG(1'b1)) u_cs (
      .clk, .rst_n, .in_valid(v), .in_enc(e), .lam_p1(p1), .lam_p2(p2),
      .lam_j(j), .lam_k(k), .out_valid(ov[6+m]), .out_j(oj[6+m]), .out_k(ok[6+m]), .err(er[6+m]));
    pcsa_reco #(.N(N), .K(2), .MODE(MODES[m]), .G(1), .SIG(1'b1)) u_ps (
      .clk, .rst_n, .in_valid(v), .in_enc(e), .lam_p1(p1), .lam_p2(p2),
      .lam_j(j), .lam_k(k), .out_valid(ov[9+m]), .out_j(oj[9+m]), .out_k(ok[9+m]), .err(er[9+m]));
    // Stuck-at: after every clock edge the faulty register bits are forced
    // back to their stuck values.
    always @(posedge clk) begin
      #1;
      if (inj) begin
        u_c.q_m  = (u_c.q_m  & ~P'(fmask[m][0]))   | (P'(fval[m][0])   & P'(fmask[m][0]));
        u_c.q_j  = (u_c.q_j  & ~P'(fmask[m][1]))   | (P'(fval[m][1])   & P'(fmask[m][1]));
        u_c.q_k  = (u_c.q_k  & ~P'(fmask[m][2]))   | (P'(fval[m][2])   & P'(fmask[m][2]));
        u_p.q_1j = (u_p.q_1j & ~P'(fmask[3+m][0])) | (P'(fval[3+m][0]) & P'(fmask[3+m][0]));
        u_p.q_2j = (u_p.q_2j & ~P'(fmask[3+m][1])) | (P'(fval[3+m][1]) & P'(fmask[3+m][1]));
        u_p.q_1k = (u_p.q_1k & ~P'(fmask[3+m][2])) | (P'(fval[3+m][2]) & P'(fmask[3+m][2]));
        u_p.q_2k = (u_p.q_2k & ~P'(fmask[3+m][3])) | (P'(fval[3+m][3]) & P'(fmask[3+m][3]));
        u_cs.q_m  = (u_cs.q_m  & ~P'(fmask[6+m][0])) | (P'(fval[6+m][0]) & P'(fmask[6+m][0]));
        u_cs.q_j  = (u_cs.q_j  & ~P'(fmask[6+m][1])) | (P'(fval[6+m][1]) & P'(fmask[6+m][1]));
        u_cs.q_k  = (u_cs.q_k  & ~P'(fmask[6+m][2])) | (P'(fval[6+m][2]) & P'(fmask[6+m][2]));
        u_ps.q_1j = (u_ps.q_1j & ~P'(fmask[9+m][0])) | (P'(fval[9+m][0]) & P'(fmask[9+m][0]));
        u_ps.q_2j = (u_ps.q_2j & ~P'(fmask[9+m][1])) | (P'(fval[9+m][1]) & P'(fmask[9+m][1]));
        u_ps.q_1k = (u_ps.q_1k & ~P'(fmask[9+m][2])) | (P'(fval[9+m][2]) & P'(fmask[9+m][2]));
        u_ps.q_2k = (u_ps.q_2k & ~P'(fmask[9+m][3])) | (P'(fval[9+m][3]) & P'(fmask[9+m][3]));
      end
    end
  end

  function automatic int width_of(int u);
    return reco_width(MODES[u % 3], N, 2);
  endfunction

  // Place nb stuck bits at random positions of the unit's stage-1 registers.
  task automatic place(int u, int nb);
    int nreg;
    nreg = ((u / 3) % 2 == 0) ? 3 : 4;
    for (int r = 0; r < 4; r++) begin fmask[u][r] = 0; fval[u][r] = $urandom; end
    for (int b = 0; b < nb; b++) begin
      int r, bit_i;
      do begin
        r = $urandom % nreg;
        bit_i = $urandom % width_of(u);
      end while (fmask[u][r][bit_i]);
      fmask[u][r][bit_i] = 1'b1;
    end
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  int n_inj [NU][5], n_cor [NU][5], n_det [NU][5], n_esc [NU][5];
  string uname [NU] = '{"CSA RESO", "CSA RERO", "CSA M_RESO", "PCSA RESO", "PCSA RERO", "PCSA M_RESO",
                        "CSA S+RESO", "CSA S+RERO", "CSA S+M_RESO",
                        "PCSA S+RESO", "PCSA S+RERO", "PCSA S+M_RESO"};
  string cname [5] = '{"1-bit", "2-bit", "3-bit", "4-bit", "multiple"};

  initial begin
    v = 0; e = 0; {p1, p2, j, k} = '0; inj = 0; lfsr_en = 0;
    for (int u = 0; u < NU; u++) for (int r = 0; r < 4; r++) begin fmask[u][r] = 0; fval[u][r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5; c++) begin
      for (int t = 0; t < ALL; t++) begin
        logic [N-1:0] mx, gj, gk;
        bit faulty;
        faulty = (t % 11) != 10;
        // operands from the LFSR, one step per operand
        @(negedge clk);
        lfsr_en = 1;
        p1 = lq[N-1:0];
        @(negedge clk); p2 = lq[N-1:0];
        @(negedge clk); j  = lq[N-1:0];
        @(negedge clk); k  = lq[N-1:0]; lfsr_en = 0;
        mx = (p1 > p2) ? p1 : p2;
        gj = mx + j;
        gk = mx + k;
        for (int u = 0; u < NU; u++) place(u, (c < 4) ? c + 1 : 1 + ($urandom % 8));
        inj = faulty;
        v = 1; e = 0;                 // 1st run
        @(negedge clk) e = 1;         // 2nd run
        @(negedge clk) v = 0; e = 0;
        @(posedge clk); #2;           // result of the rerun
        inj = 0;
        for (int u = 0; u < NU; u++) begin
          bit corrupt;
          check(ov[u], $sformatf("%s no result", uname[u]));
          corrupt = (oj[u] != gj) || (ok[u] != gk);
          if (!faulty) begin
            check(!corrupt && !er[u], $sformatf("%s fault-free trial wrong", uname[u]));
          end else begin
            n_inj[u][c]++;
            if (corrupt) n_cor[u][c]++;
            if (er[u]) n_det[u][c]++;
            if (corrupt && !er[u]) n_esc[u][c]++;
          end
        end
      end
    end
    $display("unit          class     injected  corrupting  detected  escapes  detected/corrupting");
    for (int u = 0; u < NU; u++)
      for (int c = 0; c < 5; c++) begin
        real cov;
        cov = (n_cor[u][c] == 0) ? 100.0 : 100.0 * (n_cor[u][c] - n_esc[u][c]) / n_cor[u][c];
        $display("%-13s %-9s %8d  %10d  %8d  %7d  %6.2f %%", uname[u], cname[c],
                 n_inj[u][c], n_cor[u][c], n_det[u][c], n_esc[u][c], cov);
        // Modified RESO compares only N-K bits, so it is held to a lower bar;
        // the combined units must do better than recomputing alone.
        check(cov >= ((u >= 6) ? ((u % 3 == 2) ? 99.0 : 99.9) : ((u % 3 == 2) ? 80.0 : 98.0)),
              $sformatf("%s %s coverage %0.2f", uname[u], cname[c], cov));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10 * 10 * ALL * 5 + 64'd1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
