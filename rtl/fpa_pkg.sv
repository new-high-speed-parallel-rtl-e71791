// fpa_pkg -- shared sizes and column boundaries of the 16 x 16 FPA multiplier.
//
// The multiplier reduces eight radix-4 Booth partial products with four
// parallel-counter stages.  After each stage the lowest columns of the array
// hold at most two bits; a small "first partial product addition" (FPA) adder
// turns them into final product bits while the higher columns are still being
// compressed.  The column ranges below (2, 3, 4 and 6 bits wide) place bits
// 0..14 of the product in the FPA adders and leave columns 15..31 for the
// final carry-lookahead adder.
package fpa_pkg;

  localparam int unsigned N      = 16;        // operand width
  localparam int unsigned PW     = 2 * N;     // product width / array columns
  localparam int unsigned NDIG   = N / 2;     // radix-4 Booth digits = rows

  typedef logic [PW-1:0] row_t;               // one row of the dot array

  // First column that each parallel-counter stage compresses.  Columns below
  // belong to the FPA adder of the previous stage.
  localparam int unsigned S1_LO = 2;          // S0 adder took columns 1..0
  localparam int unsigned S2_LO = 5;          // S1 adder took columns 4..2
  localparam int unsigned S3_LO = 9;          // S2 adder took columns 8..5
  localparam int unsigned S4_LO = 15;         // S3 adder took columns 14..9

  // Widths of the FPA adders S0..S3.
  localparam int unsigned FPA0_W = S1_LO;
  localparam int unsigned FPA1_W = S2_LO - S1_LO;
  localparam int unsigned FPA2_W = S3_LO - S2_LO;
  localparam int unsigned FPA3_W = S4_LO - S3_LO;

  // Width of the final carry-lookahead adder (columns 31..16); column 15 is a
  // single bit after stage 4 and is finished with one XOR.
  localparam int unsigned CLA_W  = PW - S4_LO - 1;

endpackage
