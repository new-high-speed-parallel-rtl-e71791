// pc_stage2 -- parallel counter stage 2: five rows to three.
//
// One layer of 5:3 counters over columns 5..31 (columns 4..0 belong to the FPA
// adders S0 and S1).  As in stage 1 the third input row is wired to the late
// input a5.  Columns 5..8 of the output then hold only rout[0] and rout[1]
// (rout[1] only from column 6), the two rows the 4-bit FPA adder S2 adds.
// Output order: rout = {sum, C1, C2}.  Combinational.
module pc_stage2
  import fpa_pkg::*;
(
  input  row_t rin  [5],
  output row_t rout [3]
);
  csa53_row #(.W(PW), .LO(S2_LO)) u_53 (
    .a1 (rin[0]), .a2 (rin[1]), .a3 (rin[3]), .a4 (rin[4]), .a5 (rin[2]),
    .s  (rout[0]), .c1 (rout[1]), .c2 (rout[2])
  );
endmodule
