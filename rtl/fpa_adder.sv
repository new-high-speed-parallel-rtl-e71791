// fpa_adder -- "first partial product addition" adder.
//
// Adds the two rows that remain in a few low columns after a parallel-counter
// stage, plus the carry from the FPA adder below, and delivers final product
// bits while the upper columns are still in the counter tree.  The adders of
// the 16 x 16 multiplier are 2, 3, 4 and 6 bits wide and chained through
// cin/cout; each has a whole counter stage of time, so a ripple-carry adder is
// used (this design's choice; only the widths come from the design).
// Combinational.
module fpa_adder #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  always_comb begin
    logic cy;
    cy = cin;
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ cy;
      cy     = (a[i] & b[i]) | (cy & (a[i] ^ b[i]));
    end
    cout = cy;
  end
endmodule
