// tb_csa_array: random and corner test of the carry-save row at 16 bits.
// Checks that a + b + c equals s + 2*cy and that every s bit is the parity
// of its three input bits.
module tb_csa_array;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_array #(.N(N)) dut (.a, .b, .c, .s, .cy);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] av, bv, cv);
    logic [N+1:0] lhs, rhs;
    a = av;
    b = bv;
    c = cv;
    #1;
    lhs = (N+2)'(a) + (N+2)'(b) + (N+2)'(c);
    rhs = (N+2)'(s) + ((N+2)'(cy) << 1);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy);
    end
    checks++;
    if (s != (a ^ b ^ c)) begin
      failures++;
      $display("FAIL parity a=%h b=%h c=%h s=%h", a, b, c, s);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '1);
    apply('1, '0, '0);
    for (int t = 0; t < 1000; t++) apply(N'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
