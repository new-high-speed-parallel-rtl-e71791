// pc_stage1 -- parallel counter stage 1: eight partial product rows to five.
//
// Rows P01..P05 (rin[0..4]) go through one layer of 5:3 counters and rows
// P06..P08 (rin[5..7]) through one layer of 3:2 counters, in columns 2..31
// (columns 1..0 were finished by the 2-bit FPA adder S0).  The third row of the
// 5:3 layer is wired to the late input a5, so that in a column with only three
// bits (e.g. column 2) the counter produces no C2 carry.  With this wiring,
// columns 2..4 of the output hold only rout[0] and rout[1] (rout[1] only from
// column 3), which is what the 3-bit FPA adder S1 adds.
// Output order: rout = {5:3 sum, 5:3 C1, 5:3 C2, 3:2 sum, 3:2 carry}.
// Row counts and the column split follow the design's dot diagram; the choice
// of counter input for each row is this design's own.  Combinational.
module pc_stage1
  import fpa_pkg::*;
(
  input  row_t rin  [8],
  output row_t rout [5]
);
  csa53_row #(.W(PW), .LO(S1_LO)) u_53 (
    .a1 (rin[0]), .a2 (rin[1]), .a3 (rin[3]), .a4 (rin[4]), .a5 (rin[2]),
    .s  (rout[0]), .c1 (rout[1]), .c2 (rout[2])
  );
  csa32_row #(.W(PW), .LO(S1_LO)) u_32 (
    .a1 (rin[5]), .a2 (rin[6]), .a3 (rin[7]),
    .s  (rout[3]), .c (rout[4])
  );
endmodule
