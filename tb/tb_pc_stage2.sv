// tb_pc_stage2 -- tests parallel counter stage 2.
// Operands x, y (random and corner values) are turned into the dot array by
// the reference model in tb_dots_pkg and compressed by stage 1.  Checks:
//   * the stage keeps the value: sum of output rows = sum of input rows over
//     columns >= 5 (modulo 2^32), also for fully random input rows;
//   * nothing is left below column 5;
//   * columns 8..5 hold only row 0 and, from column 6, row 1 (the rows of the 4-bit FPA adder).
module tb_pc_stage2;
  import tb_dots_pkg::*;
  localparam int LO = 5;
  logic [15:0] x, y;
  logic        neg_last;
  row_t        dots [8];
  logic        random_mode;
  row_t        rnd  [5];
  row_t        r1   [5];
  row_t        sin  [5];
  row_t        sout [3];
  int checks = 0, failures = 0;

  pc_stage1 u_s1 (.rin(dots), .rout(r1));
  always_comb for (int k = 0; k < 5; k++) sin[k] = random_mode ? rnd[k] : r1[k];

  pc_stage2 dut (.rin(sin), .rout(sout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] msum(const ref row_t r [5]);
    logic [31:0] acc;
    acc = '0;
    for (int k = 0; k < 5; k++) acc += r[k] & ~((32'd1 << LO) - 1);
    return acc;
  endfunction

  function automatic logic [31:0] osum(const ref row_t r [3]);
    logic [31:0] acc;
    acc = '0;
    for (int k = 0; k < 3; k++) acc += r[k];
    return acc;
  endfunction

  task automatic check_sum(string what);
    checks++;
    if (osum(sout) != msum(sin)) begin
      failures++;
      if (failures < 10) $display("FAIL %s sum x=%h y=%h got=%h want=%h", what, x, y, osum(sout), msum(sin));
    end
    checks++;
    for (int k = 0; k < 3; k++)
      if ((sout[k] & ((32'd1 << LO) - 1)) != '0) begin
        failures++;
        $display("FAIL %s bits below column %0d in row %0d", what, LO, k);
        break;
      end
  endtask

  initial begin
    random_mode = 1'b0;
    for (int k = 0; k < 20000; k++) begin
      case (k)
        0: begin x = 16'h8000; y = 16'h8000; end
        1: begin x = 16'h7fff; y = 16'h8000; end
        2: begin x = 16'hffff; y = 16'hffff; end
        3: begin x = 16'h0fff; y = 16'h568c; end
        4: begin x = 16'haaaa; y = 16'h7fff; end
        5: begin x = 16'h5555; y = 16'h8001; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      dots = build_rows(x, y, neg_last);
      #1;
      check_sum("booth");
      checks++;
      if (!(sout[1][5] == 1'b0 && sout[2][8:5] == '0)) begin
        failures++;
        if (failures < 10) $display("FAIL FPA columns x=%h y=%h", x, y);
      end
    end
    random_mode = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      for (int j = 0; j < 5; j++) rnd[j] = $urandom;
      #1;
      check_sum("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
