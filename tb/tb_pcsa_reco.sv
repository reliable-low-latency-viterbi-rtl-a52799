// Test of the recomputing PCSA unit in all three encodings (index 0 RESO,
// 1 RERO, 2 modified RESO) and both run orders: instances with G = 1 get
// N1 E1 N2 E2 ..., instances with G = 2 get N1 N2 E1 E2 ....
// The G = 2 instances are built in the combined form (SIG = 1), which must
// give the same results and also flag the upset.
// 1. 200 random operand sets per group, fault free: every result must equal
//    max(p1,p2)+j and max(p1,p2)+k (mod 256), appear exactly one clock after
//    the rerun is captured, and carry no error.
// 2. An upset in the stage-1 pipeline register of a selected precomputed sum during
//    a rerun must raise err in every instance.
module tb_pcsa_reco;
  import vit_pkg::*;
  localparam int N = 8;
  localparam reco_mode_t MODES [3] = '{RESO, RERO, M_RESO};

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;
  int checks = 0, failures = 0;

  // one input bus per run-order group
  logic         v [2];
  logic         e [2];
  logic [N-1:0] p1 [2], p2 [2], j [2], k [2];
  // outputs: [group][mode]
  logic         ov [2][3], er [2][3];
  logic [N-1:0] oj [2][3], ok [2][3];

  for (genvar g = 0; g < 2; g++) begin : g_grp
    for (genvar m = 0; m < 3; m++) begin : g_mode
      pcsa_reco #(.N(N), .K(2), .MODE(MODES[m]), .G(g + 1),
                .SIG(g == 1)) dut (
        .clk, .rst_n, .in_valid(v[g]), .in_enc(e[g]),
        .lam_p1(p1[g]), .lam_p2(p2[g]), .lam_j(j[g]), .lam_k(k[g]),
        .out_valid(ov[g][m]), .out_j(oj[g][m]), .out_k(ok[g][m]), .err(er[g][m])
      );
    end
  end

  typedef struct { logic [N-1:0] ej, ek; int cyc; } exp_t;
  exp_t q [2][$];
  int   nres [2][3];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", cycle, msg);
    end
  endtask

  // Scoreboard: the three instances of a group answer in the same cycle.
  always @(posedge clk) begin
    #2;
    for (int g = 0; g < 2; g++) begin
      if (rst_n && ov[g][0]) begin
        exp_t x;
        x = q[g].pop_front();
        for (int m = 0; m < 3; m++) begin
          check(ov[g][m], $sformatf("g%0d m%0d valid", g, m));
          check(oj[g][m] == x.ej && ok[g][m] == x.ek,
                $sformatf("g%0d m%0d result %0d/%0d exp %0d/%0d", g, m, oj[g][m], ok[g][m], x.ej, x.ek));
          check(cycle == x.cyc, $sformatf("g%0d m%0d latency", g, m));
          check(!er[g][m], $sformatf("g%0d m%0d false alarm", g, m));
          nres[g][m]++;
        end
      end
    end
  end

  logic [N-1:0] sp1 [2][2], sp2 [2][2], sj [2][2], sk [2][2];

  // One run into group g; a rerun's result is due one clock after capture.
  task automatic issue(int g, logic enc, logic [N-1:0] a, logic [N-1:0] b,
                       logic [N-1:0] c, logic [N-1:0] d);
    @(negedge clk);
    v[g] = 1; e[g] = enc; p1[g] = a; p2[g] = b; j[g] = c; k[g] = d;
    if (enc) begin
      exp_t x;
      logic [N-1:0] mx;
      mx    = (a > b) ? a : b;
      x.ej  = mx + c;
      x.ek  = mx + d;
      x.cyc = cycle + 2;
      q[g].push_back(x);
    end
  endtask

  task automatic idle(int g);
    @(negedge clk);
    v[g] = 0; e[g] = 0;
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin
      v[g] = 0; e[g] = 0; p1[g] = 0; p2[g] = 0; j[g] = 0; k[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin
      // G = 1: N1 E1 N2 E2 ...
      for (int i = 0; i < 200; i++) begin
        logic [N-1:0] a, b, c, d;
        a = N'($urandom); b = N'($urandom); c = N'($urandom); d = N'($urandom);
        issue(0, 0, a, b, c, d);
        issue(0, 1, a, b, c, d);
      end
      idle(0);
      // G = 2: N1 N2 E1 E2 ...
      for (int i = 0; i < 200; i++) begin
        for (int s = 0; s < 2; s++) begin
          sp1[1][s] = N'($urandom); sp2[1][s] = N'($urandom);
          sj[1][s]  = N'($urandom); sk[1][s]  = N'($urandom);
          issue(1, 0, sp1[1][s], sp2[1][s], sj[1][s], sk[1][s]);
        end
        for (int s = 0; s < 2; s++)
          issue(1, 1, sp1[1][s], sp2[1][s], sj[1][s], sk[1][s]);
      end
      idle(1);
    end
    idle(0); idle(1);
    repeat (4) @(posedge clk);
    for (int g = 0; g < 2; g++)
      for (int m = 0; m < 3; m++)
        check(nres[g][m] == ((g == 0) ? 200 : 400), $sformatf("g%0d m%0d count %0d", g, m, nres[g][m]));

    // 2. Upset of a selected precomputed-sum pipeline register during the rerun.
    issue(0, 0, 8'd100, 8'd40, 8'd7, 8'd9);
    issue(0, 1, 8'd100, 8'd40, 8'd7, 8'd9);
    @(posedge clk);
    #1;
    g_grp[0].g_mode[0].dut.q_1j = g_grp[0].g_mode[0].dut.q_1j ^ 10'h010;
    g_grp[0].g_mode[1].dut.q_1j = g_grp[0].g_mode[1].dut.q_1j ^ 9'h010;
    g_grp[0].g_mode[2].dut.q_1j = g_grp[0].g_mode[2].dut.q_1j ^ 8'h010;
    void'(q[0].pop_front());
    idle(0);
    @(posedge clk); #1;
    for (int m = 0; m < 3; m++) check(ov[0][m] && er[0][m], $sformatf("m%0d upset missed", m));
    nres[0][0] = 0;

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
