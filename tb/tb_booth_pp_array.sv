// tb_booth_pp_array -- the Booth partial product array against arithmetic.
// For random and corner operands: (1) every row equals the row of the
// reference model in tb_dots_pkg (digit value times multiplicand), (2) the
// rows plus the held-back Neg bit (column 14) plus the last constant one
// (column 16) add up to x*y modulo 2^32, (3) digit_neg / digit_zero match
// the digit values.
module tb_booth_pp_array;
  import tb_dots_pkg::*;
  logic [15:0] x, y;
  row_t rows [8];
  row_t ref_rows [8];
  logic neg_last, ref_neg_last;
  logic [7:0] digit_neg, digit_zero;
  int checks = 0, failures = 0;

  booth_pp_array dut (.x(x), .y(y), .rows(rows), .neg_last(neg_last),
                      .digit_neg(digit_neg), .digit_zero(digit_zero));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 30000; k++) begin
      logic [31:0] acc, want;
      case (k)
        0: begin x = 16'h8000; y = 16'h8000; end
        1: begin x = 16'h7fff; y = 16'h7fff; end
        2: begin x = 16'hffff; y = 16'h0001; end
        3: begin x = 16'h0fff; y = 16'h568c; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      #1;
      ref_rows = build_rows(x, y, ref_neg_last);
      checks++;
      if (rows != ref_rows || neg_last != ref_neg_last) begin
        failures++;
        if (failures < 10) $display("FAIL rows x=%h y=%h", x, y);
      end
      acc = 32'(neg_last) << 14;
      acc += 32'd1 << 16;
      for (int i = 0; i < 8; i++) acc += rows[i];
      want = 32'($signed(x) * $signed(y));
      checks++;
      if (acc != want) begin
        failures++;
        if (failures < 10) $display("FAIL value x=%h y=%h got=%h want=%h", x, y, acc, want);
      end
      checks++;
      for (int i = 0; i < 8; i++)
        if (digit_neg[i] != (digit(x, i) < 0) || digit_zero[i] != (digit(x, i) == 0)) begin
          failures++;
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
