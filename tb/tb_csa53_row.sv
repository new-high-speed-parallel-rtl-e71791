// tb_csa53_row -- random rows through a 5:3 counter layer with LO = 3.
// Checks that s + c1 + c2 equals the sum of the five inputs restricted to
// columns >= LO (modulo 2^W) and that the outputs are zero below LO.
module tb_csa53_row;
  localparam int W = 32, LO = 3;
  logic [W-1:0] a1, a2, a3, a4, a5, s, c1, c2;
  logic [W-1:0] m;
  int checks = 0, failures = 0;

  csa53_row #(.W(W), .LO(LO)) dut (.a1, .a2, .a3, .a4, .a5, .s, .c1, .c2);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = ~((W'(1) << LO) - 1);
    for (int k = 0; k < 3000; k++) begin
      logic [W-1:0] want, got;
      a1 = $urandom; a2 = $urandom; a3 = $urandom; a4 = $urandom; a5 = $urandom;
      if (k == 0) begin a1 = '1; a2 = '1; a3 = '1; a4 = '1; a5 = '1; end
      #1;
      want = (a1 & m) + (a2 & m) + (a3 & m) + (a4 & m) + (a5 & m);
      got  = s + c1 + c2;
      checks++;
      if (got != want || ((s | c1 | c2) & ~m) != '0) begin
        failures++;
        if (failures < 10) $display("FAIL got=%h want=%h", got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
