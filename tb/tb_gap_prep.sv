// tb_gap_prep: random and corner test of the preparation unit at 16 bits.
// For each bit the expected generate, alive and propagate come from the
// count of ones in (x_i, y_i): two, at least one, exactly one.
module tb_gap_prep;
  localparam int unsigned N = 16;
  logic [N-1:0] x, y, g, a, p;
  int checks = 0, failures = 0;

  gap_prep #(.N(N)) dut (.x, .y, .g, .a, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xv, input logic [N-1:0] yv);
    x = xv;
    y = yv;
    #1;
    for (int i = 0; i < N; i++) begin
      int ones;
      ones = int'(x[i]) + int'(y[i]);
      checks++;
      if (g[i] != (ones == 2) || a[i] != (ones >= 1) || p[i] != (ones == 1)) begin
        failures++;
        $display("FAIL bit %0d x=%0d y=%0d g=%0d a=%0d p=%0d", i, x[i], y[i], g[i], a[i], p[i]);
      end
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    for (int t = 0; t < 500; t++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
