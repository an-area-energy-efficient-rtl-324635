// ppf_tree: parallel-prefix carry network with a carry-in.
// The carry-in is treated as an extra column below bit 0 (generate = cin,
// alive = 0), giving W+1 columns. Each level l (span s = 2^(l-1)) combines
// column j with column j-s, in the Kogge-Stone manner:
//   j <  s      the column already reaches the carry-in: passed on (buffer)
//   s <= j < 2s the lower column is finished: grey cell (generate only)
//   j >= 2s     black cell (generate and alive)
// After ceil(log2(W+1)) levels column j holds the carry into bit j, so
// c[0] = cin and c[j] = carry out of bit j-1; c[W] is the carry-out.
// For W = 8 this gives three tree levels plus the final grey cell on the
// carry-out, which is the arrangement of the 8-bit example this design is
// drawn from. Purely combinational.
module ppf_tree #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] a,
  input  logic         cin,
  output logic [W:0]   c
);
  localparam int unsigned L = adder_pkg::prefix_levels(W + 1);

  logic [L:0][W:0] gl;
  logic [L:0][W:0] al;

  assign gl[0] = {g, cin};
  assign al[0] = {a, 1'b0};

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned S = 1 << (l - 1);
    for (genvar j = 0; j <= W; j++) begin : g_col
      if (j < S) begin : g_buf
        assign gl[l][j] = gl[l-1][j];
        assign al[l][j] = al[l-1][j];
      end else if (j < 2 * S) begin : g_grey
        grey_cell u_grey (
          .g_hi(gl[l-1][j]), .a_hi(al[l-1][j]), .g_lo(gl[l-1][j-S]),
          .g_out(gl[l][j])
        );
        // The group reaches the carry-in: its alive term is no longer used.
        assign al[l][j] = 1'b0;
      end else begin : g_black
        black_cell u_black (
          .g_hi(gl[l-1][j]), .a_hi(al[l-1][j]),
          .g_lo(gl[l-1][j-S]), .a_lo(al[l-1][j-S]),
          .g_out(gl[l][j]), .a_out(al[l][j])
        );
      end
    end
  end

  assign c = gl[L];
endmodule
