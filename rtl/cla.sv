// cla -- two-level carry-lookahead adder.
//
// Bit generate/propagate g = a&b, p = a^b.  Bits are grouped by four; each
// group forms a group generate/propagate, a second lookahead level computes
// the carry into every group from cin and the group signals, and each group
// then computes its internal carries by lookahead from its own carry-in.
// sum = a + b + cin, cout is the carry out of bit W-1.  W must be a multiple
// of 4 (16 in the multiplier).  Group size and two-level structure are this
// design's choice.  Combinational.
module cla #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0]  g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  initial assert (W % 4 == 0) else $error("cla: W must be a multiple of 4");

  always_comb begin
    g = a & b;
    p = a ^ b;
    // group generate / propagate
    for (int k = 0; k < NG; k++) begin
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
      gp[k] = &p[4*k +: 4];
    end
    // second level: carry into each group, written as lookahead over all
    // lower groups (sum of products, no ripple through gc)
    for (int k = 0; k <= NG; k++) begin
      logic t;
      logic pr;
      t  = 1'b0;
      pr = 1'b1;
      for (int j = k - 1; j >= 0; j--) begin
        t  = t | (pr & gg[j]);
        pr = pr & gp[j];
      end
      gc[k] = t | (pr & cin);
    end
    // carries inside each group from the group carry-in
    for (int k = 0; k < NG; k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k]   | (p[4*k]   & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k])
               | (p[4*k+1] & p[4*k] & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1])
               | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end
    sum  = p ^ c;
    cout = gc[NG];
  end
endmodule
