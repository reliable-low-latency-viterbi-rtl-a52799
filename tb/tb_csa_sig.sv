// Test of the signature-protected CSA unit (N = 8, parity).
// 1. 300 random operand sets, back to back, with correct parities: each result
//    must equal max(p1,p2)+j and max(p1,p2)+k (mod 256), arrive exactly one
//    clock after the operands are captured, carry a correct parity, and the
//    error flag must stay low.
// 2. Fault cases, each of which must raise the error flag: a wrong parity on
//    each of the four inputs, a bit flip in an output register, a stuck value
//    on the selected multiplexer output, and a corrupted carry-in-1 rail in
//    each self-checking adder. Counts of each are printed.
module tb_csa_sig;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  logic in_valid = 0;
  logic [N-1:0] p1, p2, j, k, oj, ok;
  logic         p1s, p2s, js, ks, ojs, oks, ov, err;
  int checks = 0, failures = 0, cycle = 0;
  int n_in_par = 0, n_out_reg = 0, n_mux = 0, n_adder = 0;

  csa_sig #(.N(N), .L(1)) dut (
    .clk, .rst_n, .in_valid,
    .lam_p1(p1), .lam_p1_sig(p1s), .lam_p2(p2), .lam_p2_sig(p2s),
    .lam_j(j), .lam_j_sig(js), .lam_k(k), .lam_k_sig(ks),
    .out_valid(ov), .out_j(oj), .out_j_sig(ojs), .out_k(ok), .out_k_sig(oks),
    .csa_error(err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { logic [N-1:0] ej, ek; int cyc; } exp_t;
  exp_t q[$];

  function automatic logic [N-1:0] mx(logic [N-1:0] a, logic [N-1:0] b);
    return (a > b) ? a : b;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0d %s", cycle, msg);
    end
  endtask

  // Scoreboard.
  always @(posedge clk) begin
    #1;
    if (rst_n && ov && q.size() > 0) begin
      exp_t e;
      e = q.pop_front();
      check(oj == e.ej && ok == e.ek, $sformatf("result %0d/%0d exp %0d/%0d", oj, ok, e.ej, e.ek));
      check(cycle == e.cyc + 1, $sformatf("latency %0d", cycle - e.cyc));
      check(ojs == ^oj && oks == ^ok, "output parity");
    end
  end

  task automatic drive(logic [N-1:0] a, logic [N-1:0] b, logic [N-1:0] c,
                       logic [N-1:0] d, logic [3:0] flip);
    exp_t e;
    @(negedge clk);
    in_valid = 1;
    p1 = a; p2 = b; j = c; k = d;
    p1s = ^a ^ flip[0]; p2s = ^b ^ flip[1]; js = ^c ^ flip[2]; ks = ^d ^ flip[3];
    e.ej  = mx(a, b) + c;
    e.ek  = mx(a, b) + d;
    e.cyc = cycle + 1;
    q.push_back(e);
  endtask

  initial begin
    {p1, p2, j, k} = '0;
    {p1s, p2s, js, ks} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. fault-free traffic
    for (int i = 0; i < 300; i++) begin
      drive(N'($urandom), N'($urandom), N'($urandom), N'($urandom), 4'b0);
      @(posedge clk); #1;
      check(!err, "false alarm");
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    check(q.size() == 0, "results missing");
    q.delete();
    // 2a. wrong input parity, one input at a time
    for (int b = 0; b < 4; b++) begin
      drive(N'($urandom), N'($urandom), N'($urandom), N'($urandom), 4'(1 << b));
      @(posedge clk); #1;
      check(err, $sformatf("input parity %0d missed", b));
      if (err) n_in_par++;
      @(negedge clk) in_valid = 0;
      repeat (2) @(posedge clk);
    end
    q.delete();
    // 2b. output register bit flip
    drive(8'd10, 8'd20, 8'd1, 8'd2, 4'b0);
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    q.delete();
    dut.out_j = oj ^ 8'h04;   // upset in the output register
    #1 check(err, "output register flip missed");
    if (err) n_out_reg++;
    dut.out_j = oj ^ 8'h04;
    // 2c. select multiplexer stuck at the smaller metric
    @(negedge clk);
    in_valid = 0; p1 = 8'd50; p2 = 8'd90; p1s = ^p1; p2s = ^p2;
    j = 8'd3; js = ^j; k = 8'd4; ks = ^k; in_valid = 1;
    @(posedge clk); #1;
    force dut.m_sel = 8'd50;
    #1 check(err, "mux fault missed");
    if (err) n_mux++;
    release dut.m_sel;
    // 2d. adder rail faults
    force dut.u_add_j.s1 = 8'h00;
    #1 check(err, "adder j fault missed");
    if (err) n_adder++;
    release dut.u_add_j.s1;
    force dut.u_add_k.s1 = 8'hFF;
    #1 check(err, "adder k fault missed");
    if (err) n_adder++;
    release dut.u_add_k.s1;
    @(negedge clk) in_valid = 0;
    q.delete();
    $display("detected: input parity %0d/4, output register %0d/1, mux %0d/1, adder %0d/2",
             n_in_par, n_out_reg, n_mux, n_adder);
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
