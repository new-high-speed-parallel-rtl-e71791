// compressor_53 -- the proposed "new 4:2 compressor", a 5:3 parallel counter.
//
// Counts the ones among five bits of one column.  The result is returned as a
// sum bit S of weight 1 and two carries C1 and C2, both of weight 2 (both go to
// the next column):  a1+a2+a3+a4+a5 = S + 2*(C1 + C2).
//   g  = (a1 ^ a2) ^ (a3 ^ a4)
//   h  = a1 a2 + a3 a4
//   S  = a5 ^ g
//   C1 = g ? a5 : h           (a 2:1 multiplexer steered by g)
//   C2 = (a1 + a2)(a3 + a4)
// C2 depends on a1..a4 only, and a5 enters only the last XOR and the C1
// multiplexer, so a5 is the input for the latest-arriving bit.  If at most
// three inputs are used and they sit on a1, a2 and a5, C2 is constant zero.
// These equations follow the design's compressor; gate mapping is left to
// synthesis.  Combinational.
module compressor_53 (
  input  logic [4:0] a,      // a[0] = a1 ... a[4] = a5
  output logic       s,
  output logic       c1,
  output logic       c2
);
  logic g, h;
  always_comb begin
    g  = (a[0] ^ a[1]) ^ (a[2] ^ a[3]);
    h  = (a[0] & a[1]) | (a[2] & a[3]);
    s  = a[4] ^ g;
    c1 = g ? a[4] : h;
    c2 = (a[0] | a[1]) & (a[2] | a[3]);
  end
endmodule
