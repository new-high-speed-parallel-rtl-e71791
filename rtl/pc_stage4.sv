// pc_stage4 -- parallel counter stage 4: three rows to the final two.
//
// One layer of 3:2 counters over columns 15..31 (columns 14..0 are finished by
// the FPA adders).  The two output rows P41 (sum) and P42 (carry, shifted one
// column up) go to the final adder.  Column 15 of the output holds only P41.
// Combinational.
module pc_stage4
  import fpa_pkg::*;
(
  input  row_t rin  [3],
  output row_t rout [2]
);
  csa32_row #(.W(PW), .LO(S4_LO)) u_32 (
    .a1 (rin[0]), .a2 (rin[1]), .a3 (rin[2]),
    .s  (rout[0]), .c (rout[1])
  );
endmodule
