// tb_sum_producer_rca: exhaustive test of the ripple (first-type) sum producer at
// its default 4-bit width. Every x, y and block carry is applied; generate,
// alive and propagate are formed from x and y, and the expected sum and
// carry-out are those of x + y + ci.
module tb_sum_producer_rca;
  localparam int unsigned BW = 4;
  logic [BW-1:0] x, y, s;
  logic          ci, co;
  int checks = 0, failures = 0;

  sum_producer_rca dut (.g(x & y), .a(x | y), .p(x ^ y), .ci, .s, .co);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * BW + 1)); v++) begin
      int total;
      {ci, x, y} = (2*BW+1)'(v);
      total = int'(x) + int'(y) + int'(ci);
      #1;
      checks++;
      if ({co, s} != (BW+1)'(total)) begin
        failures++;
        $display("FAIL x=%h y=%h ci=%0d -> co=%0d s=%h", x, y, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
