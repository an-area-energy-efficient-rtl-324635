// tb_ppf_tree: exhaustive test of the prefix carry tree at its default
// width of 8 bits (every x, y and carry-in), plus a random test of a 5-bit
// tree whose column count is not a power of two. Generate and alive are
// formed from operands x, y; the expected carry into bit j is bit j of
// (x mod 2^j) + (y mod 2^j) + cin.
module tb_ppf_tree;
  localparam int unsigned W0 = 8;
  localparam int unsigned W1 = 5;
  logic [W0-1:0] x0, y0;
  logic [W0:0]   c0;
  logic [W1-1:0] x1, y1;
  logic [W1:0]   c1;
  logic          cin;
  int checks = 0, failures = 0;

  ppf_tree dut0 (.g(x0 & y0), .a(x0 | y0), .cin, .c(c0));
  ppf_tree #(.W(W1)) dut1 (.g(x1 & y1), .a(x1 | y1), .cin, .c(c1));

  function automatic logic carry_into(input int unsigned xv, yv, input int unsigned ci,
                                      input int j);
    int unsigned m;
    m = (1 << j) - 1;
    return 1'(((xv & m) + (yv & m) + ci) >> j);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W0 + 1)); v++) begin
      {cin, x0, y0} = (2*W0+1)'(v);
      #1;
      for (int j = 0; j <= W0; j++) begin
        checks++;
        if (c0[j] != carry_into(x0, y0, cin, j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 x=%h y=%h cin=%0d c=%b", x0, y0, cin, c0);
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      {cin, x1, y1} = (2*W1+1)'($urandom);
      #1;
      for (int j = 0; j <= W1; j++) begin
        checks++;
        if (c1[j] != carry_into(x1, y1, cin, j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=5 x=%h y=%h cin=%0d c=%b", x1, y1, cin, c1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
