// final_adder -- carry-select final adder for product bits 31..15.
//
// After the fourth counter stage the rows P41 (columns 31..15) and P42
// (columns 31..16) remain; column 15 holds P41 alone.  Two 16-bit
// carry-lookahead adders add columns 31..16 in advance, one assuming no carry
// into column 16 and one assuming a carry.  When the carry cfpa of the FPA
// adder chain arrives, column 15 becomes p41[0]^cfpa and its carry
// p41[0]&cfpa selects one of the two precomputed sums.  The carry out of
// column 31 is dropped (product modulo 2^32).  Combinational.  The carry-select
// reading of "calculated in advance by CLA, then selected" is this design's.
module final_adder
  import fpa_pkg::*;
(
  input  logic [CLA_W:0]   p41,    // row P41, columns 31..15
  input  logic [CLA_W-1:0] p42,    // row P42, columns 31..16
  input  logic             cfpa,   // carry from the 6-bit FPA adder into column 15
  output logic [CLA_W:0]   z_hi,   // product bits 31..15
  output logic             sel     // the carry that selected (observation)
);
  logic [CLA_W-1:0] sum0, sum1;
  logic             co0, co1;

  cla #(.W(CLA_W)) u_cla0 (.a(p41[CLA_W:1]), .b(p42), .cin(1'b0), .sum(sum0), .cout(co0));
  cla #(.W(CLA_W)) u_cla1 (.a(p41[CLA_W:1]), .b(p42), .cin(1'b1), .sum(sum1), .cout(co1));

  always_comb begin
    sel     = p41[0] & cfpa;
    z_hi[0] = p41[0] ^ cfpa;
    z_hi[CLA_W:1] = sel ? sum1 : sum0;
  end
endmodule
