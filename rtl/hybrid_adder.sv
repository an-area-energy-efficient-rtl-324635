// hybrid_adder: hybrid wide-operand two-operand adder, s = x + y + cin.
// Structure:
//   1. gap_prep forms per-bit generate, alive and propagate.
//   2. Each BW-bit block folds its bit signals into one group
//      (generate, alive) pair with a chain of black cells.
//   3. ppf_tree, a parallel-prefix network over the NB = W/BW block groups
//      and the carry-in, delivers the carry into every block and the
//      carry-out.
//   4. Sum producers turn each block's carry into its BW sum bits. The low
//      N_RCA blocks receive their carries early from the tree and use the
//      simple ripple producer (sum_producer_rca); the remaining high blocks
//      use the carry-select producer (sum_producer_csl), whose two ripple
//      chains run in parallel with the tree.
// The carry network, the two kinds of sum producer and the 4-bit blocks
// follow the source description; the Kogge-Stone tree at block level and
// the split N_RCA = NB/2 are this design's choices. W must be a multiple of
// BW. Purely combinational; no clock.
module hybrid_adder #(
  parameter int unsigned W     = adder_pkg::DEFAULT_WIDTH,
  parameter int unsigned BW    = adder_pkg::SUM_BLOCK_W,
  parameter int unsigned N_RCA = (W / BW) / 2
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = W / BW;

  if (W % BW != 0 || NB == 0) begin : g_bad_width
    $error("hybrid_adder: W must be a positive multiple of BW");
  end
  if (N_RCA > NB) begin : g_bad_split
    $error("hybrid_adder: N_RCA must not exceed the number of blocks");
  end

  logic [W-1:0]  g, a, p;
  logic [NB-1:0] bg, ba;   // block group generate / alive
  logic [NB:0]   bc;       // carry into each block, bc[NB] = carry-out

  gap_prep #(.N(W)) u_prep (.x, .y, .g, .a, .p);

  for (genvar k = 0; k < NB; k++) begin : g_blk
    // Group (generate, alive) of bits k*BW .. k*BW+i, built upward.
    logic [BW-1:0] cg, ca;
    assign cg[0] = g[k*BW];
    assign ca[0] = a[k*BW];
    for (genvar i = 1; i < BW; i++) begin : g_fold
      black_cell u_black (
        .g_hi(g[k*BW+i]), .a_hi(a[k*BW+i]), .g_lo(cg[i-1]), .a_lo(ca[i-1]),
        .g_out(cg[i]), .a_out(ca[i])
      );
    end
    assign bg[k] = cg[BW-1];
    assign ba[k] = ca[BW-1];
  end

  ppf_tree #(.W(NB)) u_tree (.g(bg), .a(ba), .cin, .c(bc));

  for (genvar k = 0; k < NB; k++) begin : g_sum
    logic unused_co;
    if (k < N_RCA) begin : g_rca
      sum_producer_rca #(.BW(BW)) u_sp (
        .g(g[k*BW +: BW]), .a(a[k*BW +: BW]), .p(p[k*BW +: BW]),
        .ci(bc[k]), .s(s[k*BW +: BW]), .co(unused_co)
      );
    end else begin : g_csl
      sum_producer_csl #(.BW(BW)) u_sp (
        .g(g[k*BW +: BW]), .a(a[k*BW +: BW]), .p(p[k*BW +: BW]),
        .ci(bc[k]), .s(s[k*BW +: BW]), .co(unused_co)
      );
    end
  end

  assign cout = bc[NB];
endmodule
