// booth_encoder -- radix-4 (modified) Booth encoder for one multiplier digit.
//
// The triplet {X[2i+1], X[2i], X[2i-1]} of the multiplier selects the digit
// Q(i) in {-2,-1,0,1,2}.  The encoder produces three control lines:
//   one : |Q| = 1          (Y  = X[2i] ^ X[2i-1])
//   neg : Q < 0            (Neg = X[2i+1] & ~(X[2i] & X[2i-1]))
//   py  : Q > 0            (PY  = ~X[2i+1] & (X[2i] | X[2i-1]))
// A magnitude of two is one=0 with neg|py=1.  These are the encoder equations
// and truth table of the multiplier's design; the output "one" is the line
// the truth table calls Y.  Purely combinational.
module booth_encoder (
  input  logic [2:0] trip,   // {X[2i+1], X[2i], X[2i-1]}
  output logic       one,
  output logic       neg,
  output logic       py
);
  always_comb begin
    one = trip[1] ^ trip[0];
    neg = trip[2] & ~(trip[1] & trip[0]);
    py  = ~trip[2] & (trip[1] | trip[0]);
  end
endmodule
