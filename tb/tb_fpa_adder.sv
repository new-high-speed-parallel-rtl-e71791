// tb_fpa_adder -- exhaustive test of the FPA adder at the four widths the
// multiplier uses (2, 3, 4, 6): sum and carry out against a + b + cin.
module tb_fpa_adder;
  int checks = 0, failures = 0;
  logic [5:0] a, b;
  logic       cin;
  logic [1:0] s2; logic co2;
  logic [2:0] s3; logic co3;
  logic [3:0] s4; logic co4;
  logic [5:0] s6; logic co6;

  fpa_adder #(.W(2)) dut2 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(s2), .cout(co2));
  fpa_adder #(.W(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .cin(cin), .sum(s3), .cout(co3));
  fpa_adder #(.W(4)) dut4 (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s4), .cout(co4));
  fpa_adder #(.W(6)) dut6 (.a(a),      .b(b),      .cin(cin), .sum(s6), .cout(co6));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int w, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d a=%h b=%h cin=%b got=%0d want=%0d", w, a, b, cin, got, want);
    end
  endtask

  initial begin
    for (int t = 0; t < 64 * 64 * 2; t++) begin
      {a, b, cin} = 13'(t);
      #1;
      chk(6, int'({co6, s6}), int'(a) + int'(b) + int'(cin));
      chk(4, int'({co4, s4}), int'(a[3:0]) + int'(b[3:0]) + int'(cin));
      chk(3, int'({co3, s3}), int'(a[2:0]) + int'(b[2:0]) + int'(cin));
      chk(2, int'({co2, s2}), int'(a[1:0]) + int'(b[1:0]) + int'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
