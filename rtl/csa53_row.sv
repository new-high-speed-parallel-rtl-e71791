// csa53_row -- one layer of 5:3 parallel counters across a row of columns.
//
// Five W-bit rows enter; in every column c >= LO a compressor_53 counts the
// five bits.  Three rows leave: the sum row s (weight of column c) and the two
// carry rows c1, c2, already shifted one column up.  Columns below LO are not
// compressed and read as zero in all outputs: those columns have been taken by
// an FPA adder.  A carry out of column W-1 is dropped (arithmetic modulo 2^W).
// Sum of outputs = sum of inputs restricted to columns >= LO, modulo 2^W.
// Combinational.
module csa53_row #(
  parameter int unsigned W  = 32,
  parameter int unsigned LO = 0
) (
  input  logic [W-1:0] a1, a2, a3, a4, a5,
  output logic [W-1:0] s,
  output logic [W-1:0] c1,
  output logic [W-1:0] c2
);
  logic [W-1:0] c1_raw, c2_raw;

  for (genvar c = 0; c < W; c++) begin : g_col
    if (c >= LO) begin : g_cnt
      compressor_53 u_cnt (
        .a  ({a5[c], a4[c], a3[c], a2[c], a1[c]}),
        .s  (s[c]),
        .c1 (c1_raw[c]),
        .c2 (c2_raw[c])
      );
    end else begin : g_skip
      assign s[c]      = 1'b0;
      assign c1_raw[c] = 1'b0;
      assign c2_raw[c] = 1'b0;
    end
  end

  assign c1 = {c1_raw[W-2:0], 1'b0};
  assign c2 = {c2_raw[W-2:0], 1'b0};
endmodule
