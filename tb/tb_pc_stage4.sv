// tb_pc_stage4 -- tests parallel counter stage 4.
// Operands x, y (random and corner values) are turned into the dot array by
// the reference model in tb_dots_pkg and compressed by stages 1 to 3.  Checks:
//   * the stage keeps the value: sum of output rows = sum of input rows over
//     columns >= 15 (modulo 2^32), also for fully random input rows;
//   * nothing is left below column 15;
//   * column 15 holds only row 0 (P41), so the final adder needs one XOR there.
module tb_pc_stage4;
  import tb_dots_pkg::*;
  localparam int LO = 15;
  logic [15:0] x, y;
  logic        neg_last;
  row_t        dots [8];
  logic        random_mode;
  row_t        rnd  [3];
  row_t        r1   [5];
  row_t        r2   [3];
  row_t        r2i  [4];
  row_t        r3   [3];
  row_t        sin  [3];
  row_t        sout [2];
  int checks = 0, failures = 0;

  pc_stage1 u_s1 (.rin(dots), .rout(r1));
  pc_stage2 u_s2 (.rin(r1), .rout(r2));
  always_comb begin
    for (int k = 0; k < 3; k++) r2i[k] = r2[k];
    r2i[3] = (32'(neg_last) << 14) | (32'd1 << 16);
  end
  pc_stage3 u_s3 (.rin(r2i), .rout(r3));
  always_comb for (int k = 0; k < 3; k++) sin[k] = random_mode ? rnd[k] : r3[k];

  pc_stage4 dut (.rin(sin), .rout(sout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] msum(const ref row_t r [3]);
    logic [31:0] acc;
    acc = '0;
    for (int k = 0; k < 3; k++) acc += r[k] & ~((32'd1 << LO) - 1);
    return acc;
  endfunction

  function automatic logic [31:0] osum(const ref row_t r [2]);
    logic [31:0] acc;
    acc = '0;
    for (int k = 0; k < 2; k++) acc += r[k];
    return acc;
  endfunction

  task automatic check_sum(string what);
    checks++;
    if (osum(sout) != msum(sin)) begin
      failures++;
      if (failures < 10) $display("FAIL %s sum x=%h y=%h got=%h want=%h", what, x, y, osum(sout), msum(sin));
    end
    checks++;
    for (int k = 0; k < 2; k++)
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
      if (!(sout[1][15] == 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL FPA columns x=%h y=%h", x, y);
      end
    end
    random_mode = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      for (int j = 0; j < 3; j++) rnd[j] = $urandom;
      #1;
      check_sum("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
