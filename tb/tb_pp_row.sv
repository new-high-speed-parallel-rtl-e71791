// tb_pp_row -- checks one partial product row for every digit and random
// multiplicands.  With the sign bit restored, the 17-bit row read as a signed
// number plus the Neg bit must equal Q*y.
module tb_pp_row;
  localparam int N = 16;
  logic [N-1:0] y;
  logic one, two, neg;
  logic [N:0] pp;
  int checks = 0, failures = 0;

  pp_row #(.N(N)) dut (.y(y), .one(one), .two(two), .neg(neg), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qs [5] = '{-2, -1, 0, 1, 2};
    for (int k = 0; k < 2000; k++) begin
      for (int d = 0; d < 5; d++) begin
        int q, got, want;
        q = qs[d];
        case (k)
          0: y = 16'h8000;
          1: y = 16'h7fff;
          2: y = 16'h0000;
          3: y = 16'hffff;
          default: y = 16'($urandom);
        endcase
        one = (q == 1 || q == -1);
        two = (q == 2 || q == -2);
        neg = (q < 0);
        #1;
        got  = int'($signed({~pp[N], pp[N-1:0]})) + int'(neg);
        want = q * int'($signed(y));
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("FAIL y=%h q=%0d pp=%h got=%0d want=%0d", y, q, pp, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
