// csa32_row -- one layer of 3:2 parallel counters (full adders) across a row.
//
// Three W-bit rows enter; in every column c >= LO a counter_32 adds the three
// bits.  Two rows leave: the sum row s and the carry row c, already shifted one
// column up.  Columns below LO belong to an FPA adder and read as zero.  A carry
// out of column W-1 is dropped (arithmetic modulo 2^W).  Combinational.
module csa32_row #(
  parameter int unsigned W  = 32,
  parameter int unsigned LO = 0
) (
  input  logic [W-1:0] a1, a2, a3,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] c_raw;

  for (genvar k = 0; k < W; k++) begin : g_col
    if (k >= LO) begin : g_cnt
      counter_32 u_cnt (
        .a ({a3[k], a2[k], a1[k]}),
        .s (s[k]),
        .c (c_raw[k])
      );
    end else begin : g_skip
      assign s[k]     = 1'b0;
      assign c_raw[k] = 1'b0;
    end
  end

  assign c = {c_raw[W-2:0], 1'b0};
endmodule
