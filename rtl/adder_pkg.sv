// adder_pkg: constants shared by the hybrid wide-operand adder.
// SUM_BLOCK_W is the width of one sum-producer block. The four-bit block
// follows the description of the sum producers as pairs of 4-bit ripple-carry
// adders. DEFAULT_WIDTH is the operand width of the main configuration
// (16 bits); the design also scales to 32, 64 and 128 bits.
package adder_pkg;
  localparam int unsigned SUM_BLOCK_W   = 4;
  localparam int unsigned DEFAULT_WIDTH = 16;

  // Number of prefix levels a Kogge-Stone tree over `cols` columns needs.
  function automatic int unsigned prefix_levels(input int unsigned cols);
    int unsigned l;
    l = 0;
    while ((1 << l) < cols) l++;
    return l;
  endfunction
endpackage
