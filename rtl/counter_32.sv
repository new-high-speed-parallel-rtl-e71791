// counter_32 -- 3:2 parallel counter (full adder) for one column.
//
// a[0]+a[1]+a[2] = s + 2*c.  Used in the parallel-counter stages where three
// rows remain.  Combinational; plain full-adder equations.
module counter_32 (
  input  logic [2:0] a,
  output logic       s,
  output logic       c
);
  always_comb begin
    s = a[0] ^ a[1] ^ a[2];
    c = (a[0] & a[1]) | (a[2] & (a[0] ^ a[1]));
  end
endmodule
