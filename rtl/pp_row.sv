// pp_row -- one Booth partial product row.
//
// Selects 0, Y or 2Y of the N-bit two's-complement multiplicand as an (N+1)-bit
// signed value and one's-complements it when the digit is negative; the "+1"
// that completes the two's complement is added elsewhere as a separate bit
// (the Neg dot of the array).  For sign-extension elimination the sign bit
// (bit N) is returned complemented, so the row needs no sign-extension bits:
// the array adds a constant that makes up for it.
//   pp[N-1:0] = bits of (+-)|Q|*Y (one's complement when neg)
//   pp[N]     = ~sign of that (N+1)-bit value
// Combinational.  The AND-OR selection is this design's choice.
module pp_row #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] y,
  input  logic         one,   // |Q| = 1
  input  logic         two,   // |Q| = 2
  input  logic         neg,   // Q < 0
  output logic [N:0]   pp
);
  logic [N:0] mag;
  always_comb begin
    mag = ({(N+1){one}} & {y[N-1], y}) | ({(N+1){two}} & {y, 1'b0});
    pp  = mag ^ {(N+1){neg}};
    pp[N] = ~pp[N];
  end
endmodule
