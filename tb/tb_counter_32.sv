// tb_counter_32 -- exhaustive test of the 3:2 counter: s + 2c = ones(a).
module tb_counter_32;
  logic [2:0] a;
  logic s, c;
  int checks = 0, failures = 0;

  counter_32 dut (.a(a), .s(s), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      a = 3'(t);
      #1;
      checks++;
      if (int'(s) + 2 * int'(c) != $countones(a)) begin
        failures++;
        $display("FAIL a=%b s=%b c=%b", a, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
