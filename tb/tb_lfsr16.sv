// Test of the 16-bit LFSR (taps 16, 13, 11 of x^16 + x^13 + x^11 + 1).
// Checks the reset seed, that the state holds while en is low, that load sets
// the state, that each step shifts left by one, and that the stream of
// inserted bits obeys the recurrence b(t+16) = b(t) ^ b(t+3) ^ b(t+5) (the
// register read from its tap side) over 3000 steps.
module tb_lfsr16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en, load;
  logic [15:0] load_val, q, prev;
  bit          b [$];

  lfsr16 dut (.clk, .rst_n, .en, .load, .load_val, .q);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    en = 0; load = 0; load_val = 0;
    repeat (2) @(posedge clk);
    #1 check(q == 16'hACE1, "reset seed");
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 check(q == 16'hACE1, "hold while en low");
    @(negedge clk); load = 1; load_val = 16'h1234;
    @(negedge clk); load = 0;
    check(q == 16'h1234, "load");
    for (int i = 0; i < 16; i++) b.push_back(q[15 - i]);
    en = 1;
    for (int t = 0; t < 3000; t++) begin
      prev = q;
      @(negedge clk);
      check(q[15:1] == prev[14:0], "shift");
      b.push_back(q[0]);
    end
    for (int t = 0; t + 16 < b.size(); t++)
      check(b[t + 16] == (b[t] ^ b[t + 3] ^ b[t + 5]), $sformatf("recurrence at %0d", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
