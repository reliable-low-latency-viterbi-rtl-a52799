// Test of the run scheduler with G = 1, 2 and 3.
// Phase A, continuous input: the issued runs must follow N^G E^G N^G E^G ...
// (N1 E1 N2 E2 for G = 1, N1 N2 E1 E2 for G = 2), one set accepted every two
// cycles, every 1st run one clock after its acceptance with the same data,
// and the reruns in acceptance order with the same data.
// Phase B, random gaps in the input: data and order rules as above, at most G
// sets waiting for their rerun, and a pause makes the waiting sets rerun.
module tb_reco_sched;
  localparam int DW = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;
  int checks = 0, failures = 0;

  logic          iv [3], ir [3], ov [3], oe [3];
  logic [DW-1:0] id [3], od [3];

  for (genvar g = 0; g < 3; g++) begin : g_s
    reco_sched #(.DW(DW), .G(g + 1)) dut (
      .clk, .rst_n, .in_valid(iv[g]), .in_ready(ir[g]), .in_data(id[g]),
      .iss_valid(ov[g]), .iss_enc(oe[g]), .iss_data(od[g])
    );
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", cycle, msg);
    end
  endtask

  logic [DW-1:0] acc_q [3][$];   // accepted, 1st run not yet seen
  logic [DW-1:0] pend  [3][$];   // 1st run seen, rerun not yet seen
  logic [DW-1:0] last_acc [3];
  bit            was_acc [3];
  int            n_acc [3], n_e [3];
  string         pat [3];
  bit            record;
  bit            gaps;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < 3; g++) begin
        was_acc[g] <= iv[g] && ir[g];
        last_acc[g] <= id[g];
        if (iv[g] && ir[g]) n_acc[g]++;
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      for (int g = 0; g < 3; g++) begin
        if (was_acc[g]) begin
          check(ov[g] && !oe[g] && od[g] == last_acc[g], $sformatf("G%0d 1st run", g + 1));
          pend[g].push_back(last_acc[g]);
          if (record) pat[g] = {pat[g], "N"};
        end else if (ov[g]) begin
          logic [DW-1:0] x;
          check(oe[g] && pend[g].size() > 0, $sformatf("G%0d unexpected run", g + 1));
          x = pend[g].pop_front();
          check(od[g] == x, $sformatf("G%0d rerun data %0h exp %0h", g + 1, od[g], x));
          n_e[g]++;
          if (record) pat[g] = {pat[g], "E"};
        end
        check(pend[g].size() <= g + 1, $sformatf("G%0d too many waiting", g + 1));
      end
    end
  end

  initial begin
    for (int g = 0; g < 3; g++) begin iv[g] = 0; id[g] = 0; pat[g] = ""; end
    record = 0; gaps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase A: continuous input for 24 cycles.
    @(negedge clk);
    record = 1;
    for (int c = 0; c < 24; c++) begin
      for (int g = 0; g < 3; g++) begin iv[g] = 1; id[g] = DW'($urandom); end
      @(negedge clk);
    end
    for (int g = 0; g < 3; g++) iv[g] = 0;
    record = 0;
    repeat (8) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      string exp_p;
      exp_p = "";
      while (exp_p.len() < pat[g].len()) begin
        for (int i = 0; i <= g; i++) exp_p = {exp_p, "N"};
        for (int i = 0; i <= g; i++) exp_p = {exp_p, "E"};
      end
      exp_p = exp_p.substr(0, pat[g].len() - 1);
      check(pat[g] == exp_p, $sformatf("G%0d order %s", g + 1, pat[g]));
      check(n_acc[g] == 12, $sformatf("G%0d accepted %0d in 24 cycles", g + 1, n_acc[g]));
      $display("G=%0d run order: %s", g + 1, pat[g]);
    end
    // Phase B: random gaps.
    for (int c = 0; c < 400; c++) begin
      for (int g = 0; g < 3; g++) begin
        if (!iv[g] || ir[g]) begin
          iv[g] = ($urandom % 3) != 0;
          id[g] = DW'($urandom);
        end
      end
      @(negedge clk);
    end
    for (int g = 0; g < 3; g++) iv[g] = 0;
    repeat (8) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      check(pend[g].size() == 0, $sformatf("G%0d sets never rerun", g + 1));
      check(n_e[g] == n_acc[g], $sformatf("G%0d reruns %0d of %0d", g + 1, n_e[g], n_acc[g]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
