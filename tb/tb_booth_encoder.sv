// tb_booth_encoder -- exhaustive test of the radix-4 Booth encoder.
// For all eight triplets the digit value Q = -2*x2 + x1 + x0 is computed in
// the testbench and the outputs are checked: one = (|Q|==1), neg = (Q<0),
// py = (Q>0).
module tb_booth_encoder;
  logic [2:0] trip;
  logic one, neg, py;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .one(one), .neg(neg), .py(py));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int q;
      trip = 3'(t);
      #1;
      q = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      checks++;
      if (one !== (q == 1 || q == -1) || neg !== (q < 0) || py !== (q > 0)) begin
        failures++;
        $display("FAIL trip=%b q=%0d one=%b neg=%b py=%b", trip, q, one, neg, py);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
