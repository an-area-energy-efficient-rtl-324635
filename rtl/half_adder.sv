// half_adder: one-bit half adder. It closes the most significant position of
// the three-operand adder: s = a ^ b, co = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
