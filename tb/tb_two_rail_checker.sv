// Exhaustive test of the two-pair two-rail checker: for all 16 input
// combinations the output pair must be complementary exactly when both input
// pairs are, and must match the AND-OR equations.
module tb_two_rail_checker;
  logic a1, a0, b1, b0, z1, z2;
  int checks = 0, failures = 0;

  two_rail_checker dut (.a1, .a0, .b1, .b0, .z1, .z2);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a1, a0, b1, b0} = 4'(v);
      #1;
      checks++;
      if ((z1 != z2) != ((a1 != a0) && (b1 != b0))) begin
        failures++;
        $display("FAIL code v=%0h z=%b%b", v, z1, z2);
      end
      checks++;
      if (z1 != ((a1 && b1) || (a0 && b0)) || z2 != ((a1 && b0) || (a0 && b1))) begin
        failures++;
        $display("FAIL eq v=%0h z=%b%b", v, z1, z2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
