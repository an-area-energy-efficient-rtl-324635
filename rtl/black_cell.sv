// black_cell: full prefix operator of the carry network.
// Combines the (generate, alive) pair of a higher group with that of the
// adjacent lower group: g_out = g_hi | (a_hi & g_lo), a_out = a_hi & a_lo.
// Purely combinational.
module black_cell (
  input  logic g_hi,
  input  logic a_hi,
  input  logic g_lo,
  input  logic a_lo,
  output logic g_out,
  output logic a_out
);
  always_comb begin
    g_out = g_hi | (a_hi & g_lo);
    a_out = a_hi & a_lo;
  end
endmodule
