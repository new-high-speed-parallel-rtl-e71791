// tb_final_adder -- carry-select final adder: z_hi must equal
// (p41 + (p42 << 1) + cfpa) modulo 2^17 for random rows, and the select
// carry must be p41[0] & cfpa.  Both select values are counted and must occur.
module tb_final_adder;
  logic [16:0] p41, z_hi;
  logic [15:0] p42;
  logic cfpa, sel;
  int checks = 0, failures = 0, n_sel1 = 0, n_sel0 = 0;

  final_adder dut (.p41(p41), .p42(p42), .cfpa(cfpa), .z_hi(z_hi), .sel(sel));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 50000; k++) begin
      logic [16:0] want;
      p41 = 17'($urandom); p42 = 16'($urandom); cfpa = 1'($urandom);
      if (k == 0) begin p41 = '1; p42 = '1; cfpa = 1'b1; end
      if (k == 1) begin p41 = 17'h1fffe; p42 = 16'h0000; cfpa = 1'b1; end
      if (k == 2) begin p41 = 17'h00001; p42 = 16'hffff; cfpa = 1'b1; end
      #1;
      want = p41 + {p42, 1'b0} + 17'(cfpa);
      checks++;
      if (z_hi != want || sel != (p41[0] & cfpa)) begin
        failures++;
        if (failures < 10) $display("FAIL p41=%h p42=%h c=%b got=%h want=%h", p41, p42, cfpa, z_hi, want);
      end
      if (sel) n_sel1++; else n_sel0++;
    end
    checks++;
    if (n_sel1 == 0 || n_sel0 == 0) failures++;
    $display("select carry: 1 in %0d cases, 0 in %0d cases", n_sel1, n_sel0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
