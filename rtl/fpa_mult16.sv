// fpa_mult16 -- 16 x 16 signed parallel multiplier with First Partial product
// Addition (FPA).
//
// z = x * y for two's-complement x (multiplier) and y (multiplicand).
//   1. booth_pp_array: radix-4 Booth encoding gives eight partial product rows
//      with sign-extension elimination (the dot array P01..P08).
//   2. Four parallel-counter stages built from the 5:3 compressor and the 3:2
//      counter reduce 8 -> 5 -> 3 (+1 sparse row) -> 3 -> 2 rows.
//   3. FPA: after the Booth array and after stages 1, 2 and 3 the lowest
//      columns hold at most two bits.  A 2-, 3-, 4- and 6-bit adder, chained by
//      their carries, turn them into product bits 1..0, 4..2, 8..5 and 14..9
//      while the upper columns are still being compressed.  Each stage ignores
//      the columns already taken.
//   4. final_adder: column 15 plus two 16-bit carry-lookahead adders for
//      columns 31..16, one per carry-in, selected by the FPA carry.
// Only 16 of the 32 product columns therefore go through the wide final
// adder.  The datapath z_comb is combinational; z is z_comb registered on the
// rising clock edge (one cycle latency, synchronous active-high reset to 0).
// The register is this design's choice: the multiplier's own description
// leaves the timing boundary open and mentions pipelining only as an option.
//
// The *_o observation outputs expose internal events (Booth digit types, the
// FPA carries) so that a test can see which mechanisms were exercised; they
// are not needed for the function.
module fpa_mult16
  import fpa_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [N-1:0]      x,          // multiplier
  input  logic [N-1:0]      y,          // multiplicand
  output logic [PW-1:0]     z_comb,     // product, combinational
  output logic [PW-1:0]     z,          // product, registered
  output logic [NDIG-1:0]   digit_neg_o,
  output logic [NDIG-1:0]   digit_zero_o,
  output logic [3:0]        fpa_carry_o, // carries out of FPA adders S0..S3
  output logic              cla_sel_o    // carry that selected the upper sum
);
  row_t r0 [NDIG];
  row_t r1 [5];
  row_t r2 [3];
  row_t r2i[4];
  row_t r3 [3];
  row_t r4 [2];
  logic neg_last;
  logic c2, c5, c9, c15;

  // ---- Booth encoder and partial products -------------------------------
  booth_pp_array u_pp (
    .x (x), .y (y), .rows (r0), .neg_last (neg_last),
    .digit_neg (digit_neg_o), .digit_zero (digit_zero_o)
  );

  // S0: columns 1..0 -- row P01 bits 1..0 plus the Neg bit of digit 0
  fpa_adder #(.W(FPA0_W)) u_s0 (
    .a   (r0[0][1:0]),
    .b   ({1'b0, r0[1][0]}),
    .cin (1'b0),
    .sum (z_comb[1:0]),
    .cout(c2)
  );

  // ---- stage 1 and S1 (columns 4..2) -------------------------------------
  pc_stage1 u_st1 (.rin (r0), .rout (r1));

  fpa_adder #(.W(FPA1_W)) u_s1 (
    .a   (r1[0][4:2]),
    .b   ({r1[1][4:3], 1'b0}),
    .cin (c2),
    .sum (z_comb[4:2]),
    .cout(c5)
  );

  // ---- stage 2, held-back bits, and S2 (columns 8..5) --------------------
  pc_stage2 u_st2 (.rin (r1), .rout (r2));

  always_comb begin
    r2i[0] = r2[0];
    r2i[1] = r2[1];
    r2i[2] = r2[2];
    r2i[3] = '0;
    r2i[3][14] = neg_last;            // Neg of the last Booth digit
    r2i[3][16] = 1'b1;                // last constant of sign-extension elimination
  end

  fpa_adder #(.W(FPA2_W)) u_s2 (
    .a   (r2[0][8:5]),
    .b   ({r2[1][8:6], 1'b0}),
    .cin (c5),
    .sum (z_comb[8:5]),
    .cout(c9)
  );

  // ---- stage 3 and S3 (columns 14..9) ------------------------------------
  pc_stage3 u_st3 (.rin (r2i), .rout (r3));

  fpa_adder #(.W(FPA3_W)) u_s3 (
    .a   (r3[0][14:9]),
    .b   ({r3[1][14:10], 1'b0}),
    .cin (c9),
    .sum (z_comb[14:9]),
    .cout(c15)
  );

  // ---- stage 4 and the final adder (columns 31..15) ----------------------
  pc_stage4 u_st4 (.rin (r3), .rout (r4));

  final_adder u_fin (
    .p41  (r4[0][PW-1:S4_LO]),
    .p42  (r4[1][PW-1:S4_LO+1]),
    .cfpa (c15),
    .z_hi (z_comb[PW-1:S4_LO]),
    .sel  (cla_sel_o)
  );

  assign fpa_carry_o = {c15, c9, c5, c2};

  // ---- output register ---------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) z <= '0;
    else     z <= z_comb;
  end

  // The FPA adders read only the rows that can hold bits in their columns;
  // the other rows are zero there by construction of the dot array.
  always_comb begin
    assert (r0[1][1] == 1'b0 && (r0[2][1:0] | r0[3][1:0] | r0[4][1:0] | r0[5][1:0]
            | r0[6][1:0] | r0[7][1:0]) == '0)
      else $error("fpa_mult16: unexpected bit in columns 1..0");
    assert (r1[1][2] == 1'b0 && (r1[2][4:2] | r1[3][4:2] | r1[4][4:2]) == '0)
      else $error("fpa_mult16: unexpected bit in columns 4..2");
    assert (r2[1][5] == 1'b0 && r2[2][8:5] == '0)
      else $error("fpa_mult16: unexpected bit in columns 8..5");
    assert (r3[1][9] == 1'b0 && r3[2][14:9] == '0)
      else $error("fpa_mult16: unexpected bit in columns 14..9");
    assert (r4[1][15] == 1'b0)
      else $error("fpa_mult16: unexpected bit in column 15");
  end
endmodule
