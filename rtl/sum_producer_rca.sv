// sum_producer_rca: first-type sum producer, used for the low-order blocks.
// A BW-bit ripple-carry chain over the block's generate/alive signals,
// started by the block carry from the prefix tree:
//   k[0] = ci, k[i+1] = g[i] | (a[i] & k[i]), s[i] = p[i] ^ k[i].
// The low-order block carries leave the prefix tree early, so rippling after
// them does not lengthen the critical path, and the block needs only one
// chain. co is the block's own carry-out (used by the tests; the adder takes
// its block carries from the prefix tree). Purely combinational.
module sum_producer_rca #(
  parameter int unsigned BW = adder_pkg::SUM_BLOCK_W
) (
  input  logic [BW-1:0] g,
  input  logic [BW-1:0] a,
  input  logic [BW-1:0] p,
  input  logic          ci,
  output logic [BW-1:0] s,
  output logic          co
);
  logic [BW:0] k;
  assign k[0] = ci;
  for (genvar i = 0; i < BW; i++) begin : g_bit
    assign k[i+1] = g[i] | (a[i] & k[i]);
  end
  assign s  = p ^ k[BW-1:0];
  assign co = k[BW];
endmodule
