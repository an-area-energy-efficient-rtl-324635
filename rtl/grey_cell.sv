// grey_cell: generate-only prefix operator. Used where the lower group
// already reaches the carry-in, so its output is a finished carry and no
// alive term is needed: g_out = g_hi | (a_hi & g_lo). Purely combinational.
module grey_cell (
  input  logic g_hi,
  input  logic a_hi,
  input  logic g_lo,
  output logic g_out
);
  always_comb g_out = g_hi | (a_hi & g_lo);
endmodule
