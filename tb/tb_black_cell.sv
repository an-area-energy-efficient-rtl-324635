// tb_black_cell: exhaustive test of the full prefix operator. The expected
// outputs are derived from the meaning of the signals: a two-bit group
// generates a carry when the high part generates, or the high part lets a
// carry through and the low part generates; it lets a carry through only
// when both parts do.
module tb_black_cell;
  logic g_hi, a_hi, g_lo, a_lo, g_out, a_out;
  int checks = 0, failures = 0;

  black_cell dut (.g_hi, .a_hi, .g_lo, .a_lo, .g_out, .a_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_a;
      {g_hi, a_hi, g_lo, a_lo} = 4'(v);
      if (g_hi)      exp_g = 1'b1;
      else if (a_hi) exp_g = g_lo;
      else           exp_g = 1'b0;
      exp_a = (a_hi && a_lo);
      #1;
      checks += 2;
      if (g_out != exp_g) begin
        failures++;
        $display("FAIL g: inputs=%b g_out=%0d", 4'(v), g_out);
      end
      if (a_out != exp_a) begin
        failures++;
        $display("FAIL a: inputs=%b a_out=%0d", 4'(v), a_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
