// pc_stage3 -- parallel counter stage 3: four rows to three.
//
// Inputs are the three rows of stage 2 (rin[0..2]) and the sparse row rin[3]
// that carries the two bits held back from the partial product array: the Neg
// bit of the last Booth digit (column 14) and a constant one (column 16).  One
// layer of 5:3 counters works on columns 9..31 with a1=rin[0], a2=rin[1],
// a3=0, a4=rin[3], a5=rin[2].  Because a3 is zero, C2 = (a1|a2)&a4 can only be
// set where rin[3] has a bit, so the third output row holds just two possible
// bits (columns 15 and 17).  Columns 9..14 of the output hold only rout[0] and
// rout[1] (rout[1] only from column 10), the rows of the 6-bit FPA adder S3.
// Output order: rout = {sum, C1, C2}.  Combinational.
module pc_stage3
  import fpa_pkg::*;
(
  input  row_t rin  [4],
  output row_t rout [3]
);
  csa53_row #(.W(PW), .LO(S3_LO)) u_53 (
    .a1 (rin[0]), .a2 (rin[1]), .a3 ('0), .a4 (rin[3]), .a5 (rin[2]),
    .s  (rout[0]), .c1 (rout[1]), .c2 (rout[2])
  );
endmodule
