// tb_csa32_row -- random rows through a 3:2 counter layer with LO = 5.
// Checks s + c against the sum of the inputs restricted to columns >= LO.
module tb_csa32_row;
  localparam int W = 32, LO = 5;
  logic [W-1:0] a1, a2, a3, s, c;
  logic [W-1:0] m;
  int checks = 0, failures = 0;

  csa32_row #(.W(W), .LO(LO)) dut (.a1, .a2, .a3, .s, .c);

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
      a1 = $urandom; a2 = $urandom; a3 = $urandom;
      #1;
      want = (a1 & m) + (a2 & m) + (a3 & m);
      got  = s + c;
      checks++;
      if (got != want || ((s | c) & ~m) != '0) begin
        failures++;
        if (failures < 10) $display("FAIL got=%h want=%h", got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
