// booth_pp_array -- radix-4 Booth encoding and the partial product dot array.
//
// The 16-bit two's-complement multiplier x is split into eight overlapping
// triplets {x[2i+1], x[2i], x[2i-1]} (x[-1] = 0); each drives a booth_encoder
// and a pp_row that selects 0, +-y or +-2y of the multiplicand.  The rows are
// placed into eight 32-bit rows (P01..P08 of the dot diagram):
//   row i, columns 2i .. 2i+16 : partial product i, sign bit complemented
//   row i, column  2i+17       : constant one            (i = 0..6)
//   row 7, column  31          : constant one
//   row i+1, column 2i         : Neg of digit i          (i = 0..6)
// Neg of digit 7 (column 14) is not placed: column 14 already holds eight
// bits, so it is returned on neg_last and enters the tree after stage 2,
// together with one more constant one at column 16.  All constants together
// equal 0xAAAB0000 = -(sum of 2^(2i+16)) mod 2^32, which cancels the
// complemented sign bits: sum(rows) + neg_last*2^14 + 2^16 = x*y mod 2^32.
// digit_neg / digit_zero report each digit's sign and zero state (they only
// serve observation).  Combinational.  Booth equations and the dot layout
// follow the design; putting each Neg bit in the free slot of the next row
// (instead of collecting them in the last row) is this design's packing.
module booth_pp_array
  import fpa_pkg::*;
(
  input  logic [N-1:0] x,           // multiplier (Booth-encoded)
  input  logic [N-1:0] y,           // multiplicand
  output row_t         rows [NDIG],
  output logic         neg_last,
  output logic [NDIG-1:0] digit_neg,
  output logic [NDIG-1:0] digit_zero
);
  logic [N:0]   xe;                 // x with the implicit x[-1] = 0 at bit 0
  logic [N:0]   pp   [NDIG];
  logic [NDIG-1:0] one, neg, py;

  assign xe = {x, 1'b0};

  for (genvar i = 0; i < NDIG; i++) begin : g_dig
    booth_encoder u_enc (
      .trip (xe[2*i +: 3]),
      .one  (one[i]),
      .neg  (neg[i]),
      .py   (py[i])
    );
    pp_row #(.N(N)) u_pp (
      .y   (y),
      .one (one[i]),
      .two (~one[i] & (neg[i] | py[i])),
      .neg (neg[i]),
      .pp  (pp[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      rows[i] = '0;
      rows[i][2*i +: N+1] = pp[i];
      if (i < NDIG - 1) rows[i][2*i + N + 1] = 1'b1;
      else              rows[i][PW-1]        = 1'b1;
    end
    for (int i = 0; i < NDIG - 1; i++) rows[i+1][2*i] = neg[i];
  end

  assign neg_last   = neg[NDIG-1];
  assign digit_neg  = neg;
  assign digit_zero = ~(neg | py);
endmodule
