// tb_fpa_mult16 -- end-to-end test of the 16 x 16 FPA multiplier at its
// default size.
// A new operand pair is applied every clock cycle; the combinational product
// must equal x*y (signed, computed by the testbench) in the same cycle and the
// registered product z must show it exactly one rising edge later.  Operands:
// the pair of the reference logic simulation (0FFF x 568C = 05686974), corner
// values, and random pairs.  A synchronous reset in the middle of the run must
// clear z.  Mechanisms that must each occur at least once (a failure is
// counted otherwise): every Booth digit value -2..2, a carry out of each of
// the four FPA adders, and both choices of the carry-select final adder.
// Finally, every one of the 65536 multipliers is tried against four
// multiplicands (most negative, most positive, -1 and 568C), combinationally.
module tb_fpa_mult16;
  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] x, y;
  logic [31:0] z_comb, z;
  logic [7:0]  digit_neg, digit_zero;
  logic [3:0]  fpa_carry;
  logic        cla_sel;
  int checks = 0, failures = 0;
  int n_digit [5];
  int n_carry [4];
  int n_sel   [2];
  int n_reset = 0;
  localparam int NVEC = 200000;
  localparam logic [15:0] SWEEP_Y [4] = '{16'h8000, 16'h7fff, 16'hffff, 16'h568c};

  fpa_mult16 dut (
    .clk (clk), .rst (rst), .x (x), .y (y), .z_comb (z_comb), .z (z),
    .digit_neg_o (digit_neg), .digit_zero_o (digit_zero),
    .fpa_carry_o (fpa_carry), .cla_sel_o (cla_sel)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 4 * 65536 / 10 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(logic [15:0] v, int i);
    int vm1;
    vm1 = (i == 0) ? 0 : int'(v[2*i-1]);
    return -2 * int'(v[2*i+1]) + int'(v[2*i]) + vm1;
  endfunction

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    foreach (n_carry[i]) n_carry[i] = 0;
    foreach (n_sel[i])   n_sel[i]   = 0;
    rst = 1'b1; x = '0; y = '0;
    @(posedge clk); #1;
    checks++;
    if (z != '0) begin failures++; $display("FAIL z not cleared by reset"); end
    rst = 1'b0;
    for (int k = 0; k < NVEC; k++) begin
      logic [31:0] want;
      case (k)
        0: begin x = 16'h0fff; y = 16'h568c; end
        1: begin x = 16'h8000; y = 16'h8000; end
        2: begin x = 16'h8000; y = 16'h7fff; end
        3: begin x = 16'h7fff; y = 16'h7fff; end
        4: begin x = 16'hffff; y = 16'hffff; end
        5: begin x = 16'h0000; y = 16'h8000; end
        6: begin x = 16'haaaa; y = 16'h5555; end
        7: begin x = 16'h5555; y = 16'haaaa; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      // mid-run synchronous reset for one cycle
      rst = (k == NVEC / 2);
      #1;
      want = 32'($signed(x) * $signed(y));
      checks++;
      if (z_comb != want) begin
        failures++;
        if (failures < 10) $display("FAIL comb x=%h y=%h got=%h want=%h", x, y, z_comb, want);
      end
      if (k == 0) begin
        checks++;
        if (z_comb != 32'h0568_6974) begin failures++; $display("FAIL reference vector"); end
      end
      for (int i = 0; i < 8; i++) n_digit[digit(x, i) + 2]++;
      for (int i = 0; i < 4; i++) if (fpa_carry[i]) n_carry[i]++;
      n_sel[cla_sel]++;
      @(posedge clk); #1;
      // registered output: one cycle after the operands were applied
      checks++;
      if (rst) begin
        n_reset++;
        if (z != '0) begin failures++; $display("FAIL z not cleared by reset"); end
      end else if (z != want) begin
        failures++;
        if (failures < 10) $display("FAIL reg x=%h y=%h z=%h want=%h", x, y, z, want);
      end
    end
    $display("Booth digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("FPA carries S0:%0d S1:%0d S2:%0d S3:%0d", n_carry[0], n_carry[1], n_carry[2], n_carry[3]);
    $display("final adder select 0:%0d 1:%0d, resets:%0d", n_sel[0], n_sel[1], n_reset);
    // exhaustive multiplier sweep (one time unit per pair, no clock needed)
    for (int j = 0; j < 4; j++) begin
      for (int v = 0; v < 65536; v++) begin
        logic [31:0] want;
        x = 16'(v);
        y = SWEEP_Y[j];
        #1;
        want = 32'($signed(x) * $signed(y));
        checks++;
        if (z_comb != want) begin
          failures++;
          if (failures < 10) $display("FAIL sweep x=%h y=%h got=%h want=%h", x, y, z_comb, want);
        end
      end
    end
    foreach (n_digit[i]) begin checks++; if (n_digit[i] == 0) failures++; end
    foreach (n_carry[i]) begin checks++; if (n_carry[i] == 0) failures++; end
    foreach (n_sel[i])   begin checks++; if (n_sel[i] == 0)   failures++; end
    checks++;
    if (n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
