// three_operand_adder: top level. Adds three N-bit operands and a carry-in,
// {cout, s} = a + b + c + cin, in one combinational pass.
//   1. csa_array (bit-addition logic) reduces a, b, c to a sum vector sv and
//      a carry vector cv with a single row of full adders.
//   2. hybrid_adder adds sv and (cv << 1) over the low N bits together with
//      cin; the free bit 0 of the shifted carry vector is where cin enters,
//      as in a classic carry-save three-operand adder.
//   3. A half adder combines the top carry-save carry cv[N-1] with the
//      hybrid adder's carry-out into s[N] and cout.
// The result is N+2 bits wide: s[N:0] plus cout. The carry-save front end
// and the hybrid prefix/carry-select back end follow the source
// description; the way cin enters and the MSB half adder follow the
// classic carry-save three-operand adder. N must be a multiple of 4.
module three_operand_adder #(
  parameter int unsigned N = adder_pkg::DEFAULT_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N:0]   s,
  output logic         cout
);
  logic [N-1:0] sv, cv;
  logic         hcout;

  csa_array #(.N(N)) u_csa (.a, .b, .c, .s(sv), .cy(cv));

  hybrid_adder #(.W(N)) u_add (
    .x(sv), .y({cv[N-2:0], 1'b0}), .cin, .s(s[N-1:0]), .cout(hcout)
  );

  half_adder u_msb (.a(cv[N-1]), .b(hcout), .s(s[N]), .co(cout));
endmodule
