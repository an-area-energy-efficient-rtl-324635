// csa_array: bit-addition logic of the three-operand adder.
// A row of N independent full adders compresses three N-bit operands into a
// sum vector s (weight 2^i) and a carry vector cy (cy[i] has weight 2^(i+1)),
// so that a + b + c == s + (cy << 1). No carry travels between the cells, so
// the row has the delay of a single full adder. Purely combinational.
module csa_array #(
  parameter int unsigned N = adder_pkg::DEFAULT_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(cy[i]));
  end
endmodule
