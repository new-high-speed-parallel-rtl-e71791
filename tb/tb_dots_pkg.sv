// tb_dots_pkg -- reference model of the Booth partial product dot array, for
// testbenches.  Built from arithmetic (digit value times multiplicand), not
// from the gate equations of the design: digit i is
// q = -2*x[2i+1] + x[2i] + x[2i-1]; its row holds (q*y - neg) as a 17-bit
// two's-complement number (a one's complement when q < 0) with bit 16
// inverted, at columns 2i..2i+16, a constant one at 2i+17 (31 for the last
// row), and Neg of digit i in row i+1 at column 2i.  Neg of the last digit
// and one more constant at column 16 form the held-back row.
package tb_dots_pkg;
  typedef logic [31:0] row_t;
  typedef row_t rows8_t [8];

  function automatic int digit(logic [15:0] x, int i);
    int xm1;
    xm1 = (i == 0) ? 0 : int'(x[2*i-1]);
    return -2 * int'(x[2*i+1]) + int'(x[2*i]) + xm1;
  endfunction

  function automatic rows8_t build_rows(logic [15:0] x, logic [15:0] y,
                                        output logic neg_last);
    rows8_t r;
    for (int i = 0; i < 8; i++) r[i] = '0;
    for (int i = 0; i < 8; i++) begin
      int q;
      logic neg;
      logic [16:0] v;
      q   = digit(x, i);
      neg = (q < 0);
      v   = 17'(q * int'($signed(y)) - int'(neg));
      v[16] = ~v[16];
      r[i][2*i +: 17] = v;
      if (i < 7) r[i][2*i+17] = 1'b1;
      else       r[i][31]     = 1'b1;
      if (i < 7) r[i+1][2*i] = neg;
      else       neg_last    = neg;
    end
    return r;
  endfunction

endpackage
