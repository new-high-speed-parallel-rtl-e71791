// tb_compressor_53 -- exhaustive test of the 5:3 parallel counter.
// For all 32 input patterns: S + 2*(C1+C2) equals the number of ones, and
// C2 = (a1|a2)&(a3|a4), so that C2 does not depend on a5.
module tb_compressor_53;
  logic [4:0] a;
  logic s, c1, c2;
  int checks = 0, failures = 0;

  compressor_53 dut (.a(a), .s(s), .c1(c1), .c2(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      a = 5'(t);
      #1;
      checks++;
      if (int'(s) + 2 * (int'(c1) + int'(c2)) != $countones(a)) begin
        failures++;
        $display("FAIL count a=%b s=%b c1=%b c2=%b", a, s, c1, c2);
      end
      checks++;
      if (c2 !== ((a[0] | a[1]) & (a[2] | a[3]))) begin
        failures++;
        $display("FAIL c2 a=%b c2=%b", a, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
