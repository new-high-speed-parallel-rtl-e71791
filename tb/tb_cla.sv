// tb_cla -- the 16-bit carry-lookahead adder against a + b + cin, for
// random operands and the carry-chain corner cases (all-propagate with a
// carry in, all-generate, alternating patterns).
module tb_cla;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  cla #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 50000; k++) begin
      logic [W:0] want;
      case (k)
        0: begin a = '1;         b = '0;         cin = 1'b1; end
        1: begin a = '1;         b = '1;         cin = 1'b0; end
        2: begin a = 16'haaaa;   b = 16'h5555;   cin = 1'b1; end
        3: begin a = 16'h0fff;   b = 16'h0001;   cin = 1'b0; end
        4: begin a = 16'h00ff;   b = 16'hff00;   cin = 1'b1; end
        default: begin a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); end
      endcase
      #1;
      want = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({cout, sum} != want) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b got=%h want=%h", a, b, cin, {cout, sum}, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
