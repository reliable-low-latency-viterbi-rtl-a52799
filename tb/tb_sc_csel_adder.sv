// Test of the self-checking carry-select adder (W = 8): every pair of
// operands with both carry-in values is added, the sum and carry-out are
// compared with integer addition, and the two-rail checker output must be
// complementary (no error) in the fault-free adder. Then each sum bit of the
// carry-in-1 rail is forced to the wrong value in turn, which the checker
// must report. Finally 20000 random single stuck-at faults on the sum bits of
// either rail: err must be raised exactly when the fault is activated.
module tb_sc_csel_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout, z1, z2, err;
  int checks = 0, failures = 0;
  int detected = 0, n_act = 0, n_det = 0;
  logic [W-1:0] fv;

  sc_csel_adder #(.W(W)) dut (.a, .b, .cin, .sum, .cout, .z1, .z2, .err);

  initial begin
    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++)
        for (int c = 0; c < 2; c++) begin
          logic [W:0] ref_s;
          a = W'(x); b = W'(y); cin = 1'(c);
          #1;
          ref_s = (W+1)'(x + y + c);
          checks++;
          if ({cout, sum} != ref_s || err) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d cin=%0d got=%0d err=%b", x, y, c, {cout, sum}, err);
          end
        end
    // Stuck faults on the carry-in-1 rail must be seen by the checker.
    for (int i = 0; i < W; i++) begin
      a = W'(8'h5A); b = W'(8'h33); cin = 1'b1;
      #1;
      fv = W'(a + b + 1'b1) ^ (W'(1) << i);
      force dut.s1 = fv;
      #1;
      checks++;
      if (!err) begin
        failures++;
        $display("FAIL bit %0d flip not detected", i);
      end else detected++;
      release dut.s1;
      #1;
    end
    $display("rail-1 bit flips detected: %0d of %0d", detected, W);
    // Single stuck-at campaign on both sum rails: every activated fault must
    // be flagged, and a stuck value equal to the good value must not be.
    for (int t = 0; t < 20000; t++) begin
      int  i;
      bit  rail, sv, act;
      logic [W-1:0] good;
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      i = $urandom % W; rail = 1'($urandom); sv = 1'($urandom);
      good = rail ? W'(a + b + 1'b1) : W'(a + b);
      fv = good;
      fv[i] = sv;
      act = fv != good;
      if (rail) force dut.s1 = fv; else force dut.s0 = fv;
      #1;
      checks++;
      if (err != act) begin
        failures++;
        if (failures < 10) $display("FAIL rail %0d bit %0d stuck %0d act %0d err %0d", rail, i, sv, act, err);
      end
      if (act && err) n_det++;
      if (act) n_act++;
      release dut.s1;
      release dut.s0;
      #1;
    end
    $display("rail stuck-at faults: %0d activated, %0d detected", n_act, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
