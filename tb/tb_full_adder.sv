// tb_full_adder: exhaustive test of the one-bit full adder. All eight input
// combinations are applied; the expected sum and carry come from the integer
// sum of the three inputs.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .ci, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({co, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
