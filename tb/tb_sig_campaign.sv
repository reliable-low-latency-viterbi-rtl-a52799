// Single stuck-at fault campaign on the signature-protected CSA and PCSA
// units (8-bit metrics, parity). Operands come from the 16-bit LFSR
// (x^16 + x^13 + x^11 + 1). Each trial loads one operand set and, while it sits
// in the input registers, places one stuck-at fault at a random site:
//   ireg - a data or parity bit of one of the four input registers;
//   mux  - a bit of a select multiplexer output (the duplicate stays good);
//   oreg - a data or parity bit of the j output register.
// (Stuck-at faults inside the self-checking adders are covered by the
// adder's own test.)
// A fault is activated when the stuck value differs from the fault-free
// value at that site. Every activated fault must raise the unit's error flag
// (the schemes claim full single-fault coverage); a non-activated fault must
// not. The table lists injected, activated and detected counts per site.
module tb_sig_campaign;
  localparam int N = 8;
  localparam int TRIALS = 50000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         v;
  logic [N-1:0] p1, p2, j, k;
  logic [15:0]  lq;
  logic         lfsr_en;
  lfsr16 u_lfsr (.clk, .rst_n, .en(lfsr_en), .load(1'b0), .load_val(16'h0), .q(lq));

  logic [N-1:0] cj, ck, pj, pk;
  logic         cjs, cks, pjs, pks, cv, pv, ce, pe;
  csa_sig #(.N(N), .L(1)) u_c (
    .clk, .rst_n, .in_valid(v), .lam_p1(p1), .lam_p1_sig(^p1), .lam_p2(p2), .lam_p2_sig(^p2),
    .lam_j(j), .lam_j_sig(^j), .lam_k(k), .lam_k_sig(^k), .out_valid(cv), .out_j(cj),
    .out_j_sig(cjs), .out_k(ck), .out_k_sig(cks), .csa_error(ce));
  pcsa_sig #(.N(N), .L(1)) u_p (
    .clk, .rst_n, .in_valid(v), .lam_p1(p1), .lam_p1_sig(^p1), .lam_p2(p2), .lam_p2_sig(^p2),
    .lam_j(j), .lam_j_sig(^j), .lam_k(k), .lam_k_sig(^k), .out_valid(pv), .out_j(pj),
    .out_j_sig(pjs), .out_k(pk), .out_k_sig(pks), .pcsa_error(pe));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  int n_inj [2][3], n_act [2][3], n_det [2][3];
  string sname [3] = '{"ireg", "mux", "oreg"};

  // Stuck value applied to bit b of a fault-free vector.
  function automatic logic [N-1:0] stuck(logic [N-1:0] x, int b, bit sv);
    logic [N-1:0] y;
    y = x;
    y[b] = sv;
    return y;
  endfunction

  logic [N-1:0] fv;
  logic [N:0]   rv;

  initial begin
    v = 0; {p1, p2, j, k} = '0; lfsr_en = 0; fv = '0; rv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TRIALS; t++) begin
      for (int u = 0; u < 2; u++) begin
        int site, b, r;
        bit sv, act, err;
        logic [N-1:0] mx, ref_v;
        // fresh operands
        @(negedge clk); lfsr_en = 1; p1 = lq[N-1:0];
        @(negedge clk); p2 = lq[N-1:0];
        @(negedge clk); j = lq[N-1:0];
        @(negedge clk); k = lq[N-1:0]; lfsr_en = 0; v = 1;
        @(negedge clk); v = 0;                   // operands now in the input registers
        mx = (p1 > p2) ? p1 : p2;
        site = $urandom % 3;
        b = $urandom % N;
        sv = 1'($urandom);
        r = $urandom % 4;
        case (site)
          0: begin   // input register: data bits 0..N-1 or the parity bit (b = N)
            b = $urandom % (N + 1);
            ref_v = (r == 0) ? p1 : (r == 1) ? p2 : (r == 2) ? j : k;
            rv = {^ref_v, ref_v};
            act = rv[b] != sv;
            rv[b] = sv;
            if (u == 0) case (r)
              0: {u_c.r_p1_s, u_c.r_p1} = rv;  1: {u_c.r_p2_s, u_c.r_p2} = rv;
              2: {u_c.r_j_s, u_c.r_j} = rv;    default: {u_c.r_k_s, u_c.r_k} = rv;
            endcase else case (r)
              0: {u_p.r_p1_s, u_p.r_p1} = rv;  1: {u_p.r_p2_s, u_p.r_p2} = rv;
              2: {u_p.r_j_s, u_p.r_j} = rv;    default: {u_p.r_k_s, u_p.r_k} = rv;
            endcase
          end
          1: begin   // select multiplexer output
            ref_v = (u == 0) ? mx : N'(mx + j);
            fv = stuck(ref_v, b, sv);
            act = fv != ref_v;
            if (u == 0) force u_c.m_sel = fv; else force u_p.sum_j = fv;
          end
          default: begin   // output register j, data or parity bit
            b = $urandom % (N + 1);
            rv = (u == 0) ? {u_c.out_j_sig, u_c.out_j} : {u_p.out_j_sig, u_p.out_j};
            act = rv[b] != sv;
            rv[b] = sv;
            if (u == 0) {u_c.out_j_sig, u_c.out_j} = rv; else {u_p.out_j_sig, u_p.out_j} = rv;
          end
        endcase
        #1;
        err = (u == 0) ? ce : pe;
        n_inj[u][site]++;
        if (act) n_act[u][site]++;
        if (err) n_det[u][site]++;
        check(err == act, $sformatf("unit %0d site %s bit %0d stuck %0d: act %0d err %0d",
                                    u, sname[site], b, sv, act, err));
        // remove the fault and restore a consistent state
        release u_c.m_sel; release u_p.sum_j;
        if (site == 2) begin
          u_c.out_j_sig = ^u_c.out_j;
          u_p.out_j_sig = ^u_p.out_j;
        end
        if (site == 0) begin
          u_c.r_p1 = p1; u_c.r_p1_s = ^p1; u_c.r_p2 = p2; u_c.r_p2_s = ^p2;
          u_c.r_j = j; u_c.r_j_s = ^j; u_c.r_k = k; u_c.r_k_s = ^k;
          u_p.r_p1 = p1; u_p.r_p1_s = ^p1; u_p.r_p2 = p2; u_p.r_p2_s = ^p2;
          u_p.r_j = j; u_p.r_j_s = ^j; u_p.r_k = k; u_p.r_k_s = ^k;
        end
      end
    end
    $display("unit  site  injected  activated  detected");
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < 3; s++)
        $display("%-5s %-5s %8d  %9d  %8d", u == 0 ? "CSA" : "PCSA", sname[s],
                 n_inj[u][s], n_act[u][s], n_det[u][s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10 * 12 * TRIALS + 64'd1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
