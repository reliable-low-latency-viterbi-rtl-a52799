// End-to-end test of the error-detecting CSA stage at its default parameters
// (8-bit metrics, K = 2, parity signatures, G = 1).
// Every operand set accepted on the stream is checked against
// max(p1,p2)+j / max(p1,p2)+k at the output of all eight protected units
// (CSA and PCSA with signatures; CSA and PCSA with RESO, RERO and modified
// RESO recomputation), in order and with no error flag. The test makes each
// mechanism of the design happen and counts it:
//   stall      - in_valid held while in_ready is low (rerun slot);
//   rerun      - a 2nd run issued and checked by the recomputing units;
//   bist       - operand sets taken from the LFSR and checked like the others;
//   sig_detect - a wrong input parity raising csa_error and pcsa_error;
//   reco_detect- a pipeline upset raising each recomputing unit's err;
//   mem_rw     - decision/survivor memory writes read back clean;
//   mem_detect - a memory upset flagged on read (parity and interleaved).
// A mechanism that never happened counts as a failure.
module tb_viterbi_ed_top;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;
  int checks = 0, failures = 0;

  logic bist_en, in_valid, in_ready;
  logic [N-1:0] p1, p2, j, k;
  logic p1s, p2s, js, ks;
  logic csv, psv, ce, pe;
  logic [N-1:0] csj, csk, psj, psk;
  logic [2:0] crv, cre, prv, pre;
  logic [2:0][N-1:0] crj, crk, prj, prk;
  logic dwe, dre, dv, de, swe, sre, sv, se;
  logic [2:0] dwy, dry, swy, sry, swx, srx;
  logic [3:0] dwx, drx, dwd, dq, swd, sq;

  viterbi_ed_top dut (
    .clk, .rst_n, .bist_en, .in_valid, .in_ready,
    .lam_p1(p1), .lam_p1_sig(p1s), .lam_p2(p2), .lam_p2_sig(p2s),
    .lam_j(j), .lam_j_sig(js), .lam_k(k), .lam_k_sig(ks),
    .csa_sig_valid(csv), .csa_sig_j(csj), .csa_sig_k(csk), .csa_error(ce),
    .pcsa_sig_valid(psv), .pcsa_sig_j(psj), .pcsa_sig_k(psk), .pcsa_error(pe),
    .csa_reco_valid(crv), .csa_reco_j(crj), .csa_reco_k(crk), .csa_reco_err(cre),
    .pcsa_reco_valid(prv), .pcsa_reco_j(prj), .pcsa_reco_k(prk), .pcsa_reco_err(pre),
    .dec_we(dwe), .dec_wy(dwy), .dec_wx(dwx), .dec_wd(dwd), .dec_re(dre),
    .dec_ry(dry), .dec_rx(drx), .dec_rd_valid(dv), .dec_rd_data(dq), .dec_rd_err(de),
    .smu_we(swe), .smu_wy(swy), .smu_wx(swx), .smu_wd(swd), .smu_re(sre),
    .smu_ry(sry), .smu_rx(srx), .smu_rd_valid(sv), .smu_rd_data(sq), .smu_rd_err(se)
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", cycle, msg);
    end
  endtask

  // Scoreboards, one per unit: 0 csa_sig, 1 pcsa_sig, 2-4 csa_reco, 5-7 pcsa_reco.
  logic [2*N-1:0] sb [8][$];
  int n_stall = 0, n_rerun = 0, n_bist = 0, n_sig_det = 0, n_reco_det = 0;
  int n_mem_rw = 0, n_mem_det = 0, n_res = 0;
  bit expect_err = 0;

  function automatic logic [2*N-1:0] golden(logic [N-1:0] a, logic [N-1:0] b,
                                            logic [N-1:0] c, logic [N-1:0] d);
    logic [N-1:0] m;
    m = (a > b) ? a : b;
    return {N'(m + c), N'(m + d)};
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid && !bist_en) begin
      if (in_ready) for (int u = 0; u < 8; u++) sb[u].push_back(golden(p1, p2, j, k));
      else n_stall++;
    end
    // LFSR operands are picked up where they enter the units.
    if (rst_n && bist_en && dut.take)
      for (int u = 0; u < 8; u++) sb[u].push_back(golden(dut.s_p1, dut.s_p2, dut.s_j, dut.s_k));
    if (rst_n && dut.iss_valid && dut.iss_enc) n_rerun++;
    if (rst_n && bist_en && dut.take) n_bist++;
  end

  logic [2*N-1:0] got [8];
  logic           gv [8], ge [8];
  always_comb begin
    got[0] = {csj, csk}; gv[0] = csv; ge[0] = ce;
    got[1] = {psj, psk}; gv[1] = psv; ge[1] = pe;
    for (int m = 0; m < 3; m++) begin
      got[2+m] = {crj[m], crk[m]}; gv[2+m] = crv[m]; ge[2+m] = cre[m];
      got[5+m] = {prj[m], prk[m]}; gv[5+m] = prv[m]; ge[5+m] = pre[m];
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && !expect_err) begin
      for (int u = 0; u < 8; u++) begin
        if (gv[u]) begin
          logic [2*N-1:0] x;
          check(sb[u].size() > 0, $sformatf("unit %0d: result without operands", u));
          x = sb[u].pop_front();
          check(got[u] == x, $sformatf("unit %0d: %h exp %h", u, got[u], x));
          check(!ge[u], $sformatf("unit %0d: false alarm", u));
          n_res++;
        end
      end
    end
  end

  task automatic send(logic [N-1:0] a, logic [N-1:0] b, logic [N-1:0] c,
                      logic [N-1:0] d, bit bad_parity);
    @(negedge clk);
    in_valid = 1; p1 = a; p2 = b; j = c; k = d;
    p1s = ^a ^ bad_parity; p2s = ^b; js = ^c; ks = ^d;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    bist_en = 0; in_valid = 0; {p1, p2, j, k} = '0; {p1s, p2s, js, ks} = '0;
    {dwe, dre, swe, sre} = '0; {dwy, dry, swy, sry, swx, srx} = '0;
    {dwx, drx, dwd, swd} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Stream: in_valid stays high, so every other cycle is a stall.
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      in_valid = 1;
      p1 = N'($urandom); p2 = N'($urandom); j = N'($urandom); k = N'($urandom);
      if (i % 50 == 0) begin p1 = 8'hFF; p2 = 8'hFF; end   // equal metrics
      p1s = ^p1; p2s = ^p2; js = ^j; ks = ^k;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (8) @(posedge clk);
    for (int u = 0; u < 8; u++) check(sb[u].size() == 0, $sformatf("unit %0d lost results", u));
    check(n_res == 8 * 300 + 8 * n_bist || n_bist == 0 && n_res == 8 * 300, $sformatf("results %0d", n_res));

    // LFSR operands.
    @(negedge clk);
    bist_en = 1;
    repeat (100) @(negedge clk);
    bist_en = 0;
    repeat (8) @(negedge clk);
    for (int u = 0; u < 8; u++) check(sb[u].size() == 0, $sformatf("unit %0d lost LFSR results", u));

    // Wrong parity on an input.
    expect_err = 1;
    fork
      send(8'd12, 8'd34, 8'd5, 8'd6, 1'b1);
      begin
        @(posedge clk); #1;
        while (!dut.u_csa_sig.r_valid) begin @(posedge clk); #1; end
        check(ce && pe, "input parity error missed");
        if (ce && pe) n_sig_det++;
      end
    join
    repeat (6) @(posedge clk);
    for (int u = 0; u < 8; u++) sb[u].delete();
    // Upset in every recomputing unit's first pipeline register during a rerun.
    fork
      send(8'd200, 8'd100, 8'd7, 8'd8, 1'b0);
      begin
        @(posedge clk); #1;
        while (!(dut.iss_valid && dut.iss_enc)) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        dut.g_mode[0].u_csa.q_m  = dut.g_mode[0].u_csa.q_m  ^ 10'h020;
        dut.g_mode[1].u_csa.q_m  = dut.g_mode[1].u_csa.q_m  ^ 9'h020;
        dut.g_mode[2].u_csa.q_m  = dut.g_mode[2].u_csa.q_m  ^ 8'h020;
        dut.g_mode[0].u_pcsa.q_1j = dut.g_mode[0].u_pcsa.q_1j ^ 10'h020;
        dut.g_mode[1].u_pcsa.q_1j = dut.g_mode[1].u_pcsa.q_1j ^ 9'h020;
        dut.g_mode[2].u_pcsa.q_1j = dut.g_mode[2].u_pcsa.q_1j ^ 8'h020;
        @(posedge clk); #1;
        check(&cre && &pre && &crv && &prv, $sformatf("reco upset missed %b %b", cre, pre));
        if (&cre && &pre) n_reco_det++;
      end
    join
    repeat (6) @(posedge clk);
    expect_err = 0;
    for (int u = 0; u < 8; u++) sb[u].delete();

    // Memories: write, read back, then an upset.
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      dwe = 1; {dwy, dwx} = 7'(a * 7); dwd = 4'(a);
      swe = 1; {swy, swx} = 6'(a * 3); swd = 4'(15 - a);
    end
    @(negedge clk); dwe = 0; swe = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); dre = 1; {dry, drx} = 7'(a * 7); sre = 1; {sry, srx} = 6'(a * 3);
      @(negedge clk); dre = 0; sre = 0;
      check(dv && dq == 4'(a) && !de && sv && sq == 4'(15 - a) && !se, $sformatf("mem entry %0d", a));
      if (dv && sv && !de && !se) n_mem_rw++;
    end
    dut.u_dec_mem.mem[7] = dut.u_dec_mem.mem[7] ^ 5'b00010;
    dut.u_smu_mem.mem[3] = dut.u_smu_mem.mem[3] ^ 6'b000110;
    @(negedge clk); dre = 1; {dry, drx} = 7'd7; sre = 1; {sry, srx} = 6'd3;
    @(negedge clk); dre = 0; sre = 0;
    check(de && se, "memory upset missed");
    if (de && se) n_mem_det++;

    $display("mechanisms: stall=%0d rerun=%0d bist=%0d sig_detect=%0d reco_detect=%0d mem_rw=%0d mem_detect=%0d results=%0d",
             n_stall, n_rerun, n_bist, n_sig_det, n_reco_det, n_mem_rw, n_mem_det, n_res);
    check(n_stall > 0, "no stall");
    check(n_rerun > 0, "no rerun");
    check(n_bist > 0, "no bist");
    check(n_sig_det > 0, "no signature detection");
    check(n_reco_det > 0, "no recompute detection");
    check(n_mem_rw > 0, "no memory traffic");
    check(n_mem_det > 0, "no memory detection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
