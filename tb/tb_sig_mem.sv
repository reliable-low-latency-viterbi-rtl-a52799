// Test of the signature-protected memory with the two worked examples:
//  m1: 8 x 16 entries of 4 bits with one parity bit (5-bit stored words);
//  m2: 8 x 8 entries of 4 bits with odd/even interleaved parity (6-bit).
// Both are filled with the example contents; every stored signature read back
// must equal the precomputed value listed next to the data below, the data
// must read back unchanged and no error may be flagged. Then:
//  * a single flipped bit in a stored word must be flagged by both;
//  * a burst of two adjacent flipped bits must be flagged by m2 (interleaved
//    parity) although plain parity (m1) cannot see it;
//  * an address-decoder fault, modelled by the main array returning another,
//    self-consistent word of different parity, must be flagged by the
//    separately decoded parity copy.
module tb_sig_mem;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Example contents, row y = 0 first, column x = 0 first, one hex digit per
  // entry; below each, the signature of every entry (1 bit, resp. 2 bits
  // written as odd-bits-parity then even-bits-parity).
  localparam string D1 = {"da9bc84689150246", "a9bc846891502450", "bc84689150245091",
                          "c846891502450950", "4689150245015020", "99bc846891502455",
                          "cc84689150245092", "8468915024501504"};
  localparam string S1 = {"1001011010100110", "0010110101001100", "1011010100110001",
                          "0110101001100000", "1010100110010010", "0010110101001100",
                          "0011010100110001", "1101010011001001"};
  localparam string D2 = {"da9bc846", "9bda9bc8", "c89bda9b", "84c89bda",
                          "c884c89b", "46c89bda", "9b89bda9", "84c89bda"};
  localparam string S2 = {"1000110111100111", "1101100011011110", "1110110110001101",
                          "1001111011011000", "1110100111101101", "0111111011011000",
                          "1101101101100011", "1001111011011000"};

  logic       we1, re1, v1, e1, we2, re2, v2, e2;
  logic [2:0] wy1, ry1, wy2, ry2, wx2, rx2;
  logic [3:0] wx1, rx1, wd1, q1, wd2, q2;
  logic       s1;
  logic [1:0] s2;

  sig_mem #(.DW(4), .AYW(3), .AXW(4), .L(1), .REINF(1'b1)) m1 (
    .clk, .rst_n, .we(we1), .wy(wy1), .wx(wx1), .wd(wd1), .re(re1), .ry(ry1), .rx(rx1),
    .rd_valid(v1), .rd_data(q1), .rd_sig(s1), .rd_err(e1));
  sig_mem #(.DW(4), .AYW(3), .AXW(3), .L(2), .REINF(1'b1)) m2 (
    .clk, .rst_n, .we(we2), .wy(wy2), .wx(wx2), .wd(wd2), .re(re2), .ry(ry2), .rx(rx2),
    .rd_valid(v2), .rd_data(q2), .rd_sig(s2), .rd_err(e2));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [3:0] hexd(string s, int i);
    byte c = s[i];
    return (c >= "a") ? 4'(c - "a" + 10) : 4'(c - "0");
  endfunction

  task automatic read1(int a);
    @(negedge clk); re1 = 1; {ry1, rx1} = 7'(a);
    @(negedge clk); re1 = 0;
  endtask
  task automatic read2(int a);
    @(negedge clk); re2 = 1; {ry2, rx2} = 6'(a);
    @(negedge clk); re2 = 0;
  endtask

  initial begin
    {we1, re1, we2, re2} = '0;
    {wy1, ry1, wy2, ry2, wx2, rx2, wx1, rx1, wd1, wd2} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Fill.
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); we1 = 1; {wy1, wx1} = 7'(a); wd1 = hexd(D1, a);
      we2 = (a < 64); {wy2, wx2} = 6'(a); wd2 = hexd(D2, a % 64);
    end
    @(negedge clk); we1 = 0; we2 = 0;
    // Read back and compare with the listed signatures.
    for (int a = 0; a < 128; a++) begin
      read1(a);
      check(v1 && q1 == hexd(D1, a) && s1 == 1'(S1[a] - "0") && !e1,
            $sformatf("m1 entry %0d: %h sig %b err %b", a, q1, s1, e1));
    end
    for (int a = 0; a < 64; a++) begin
      read2(a);
      check(v2 && q2 == hexd(D2, a) && s2 == {1'(S2[2*a] - "0"), 1'(S2[2*a+1] - "0")} && !e2,
            $sformatf("m2 entry %0d: %h sig %b err %b", a, q2, s2, e2));
    end
    // Single-bit upset.
    m1.mem[5] = m1.mem[5] ^ 5'b00100;
    m2.mem[5] = m2.mem[5] ^ 6'b000100;
    read1(5); check(e1, "m1 single-bit upset missed");
    read2(5); check(e2, "m2 single-bit upset missed");
    // Burst of two adjacent bits.
    m1.mem[9] = m1.mem[9] ^ 5'b00110;
    m2.mem[9] = m2.mem[9] ^ 6'b000110;
    read1(9); check(!e1, "plain parity cannot see a 2-bit burst");
    read2(9); check(e2, "m2 burst missed");
    // Address-decoder fault: entry 0 (d, odd parity) returns entry 2's word
    // (9, even parity), which is self-consistent.
    m1.mem[0] = m1.mem[2];
    m2.mem[0] = m2.mem[2];
    read1(0); check(e1, "m1 decoder fault missed");
    read2(0); check(e2, "m2 decoder fault missed");
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
