// gap_prep: preparation unit (base logic) of the prefix adder.
// For every bit position it forms generate g = x & y, alive a = x | y and
// propagate p = x ^ y. The alive signal feeds the carry network, the
// propagate signal the sum producers. Purely combinational.
module gap_prep #(
  parameter int unsigned N = adder_pkg::DEFAULT_WIDTH
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] g,
  output logic [N-1:0] a,
  output logic [N-1:0] p
);
  always_comb begin
    g = x & y;
    a = x | y;
    p = x ^ y;
  end
endmodule
