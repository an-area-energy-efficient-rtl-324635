// tb_grey_cell: exhaustive test of the generate-only prefix operator.
module tb_grey_cell;
  logic g_hi, a_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  grey_cell dut (.g_hi, .a_hi, .g_lo, .g_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {g_hi, a_hi, g_lo} = 3'(v);
      if (g_hi)      exp_g = 1'b1;
      else if (a_hi) exp_g = g_lo;
      else           exp_g = 1'b0;
      #1;
      checks++;
      if (g_out != exp_g) begin
        failures++;
        $display("FAIL inputs=%b g_out=%0d", 3'(v), g_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
