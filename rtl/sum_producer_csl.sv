// sum_producer_csl: second-type (carry-select) sum producer, used for the
// high-order blocks whose carries leave the prefix tree last.
// Two BW-bit ripple chains compute the block sum for carry-in 0 and for
// carry-in 1 while the prefix tree is still working; the block carry from
// the tree then only drives a multiplexer. co is the selected block
// carry-out. Purely combinational.
module sum_producer_csl #(
  parameter int unsigned BW = adder_pkg::SUM_BLOCK_W
) (
  input  logic [BW-1:0] g,
  input  logic [BW-1:0] a,
  input  logic [BW-1:0] p,
  input  logic          ci,
  output logic [BW-1:0] s,
  output logic          co
);
  logic [BW-1:0] s0, s1;
  logic          co0, co1;

  sum_producer_rca #(.BW(BW)) u_rca0 (.g, .a, .p, .ci(1'b0), .s(s0), .co(co0));
  sum_producer_rca #(.BW(BW)) u_rca1 (.g, .a, .p, .ci(1'b1), .s(s1), .co(co1));

  always_comb begin
    s  = ci ? s1  : s0;
    co = ci ? co1 : co0;
  end
endmodule
