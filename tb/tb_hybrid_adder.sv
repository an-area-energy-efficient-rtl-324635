// tb_hybrid_adder: random and corner test of the hybrid two-operand adder
// at its default 16 bits and at 32 bits with a different split between
// ripple and carry-select blocks. The expected {cout, s} is x + y + cin
// computed on vectors one bit wider.
module tb_hybrid_adder;
  localparam int unsigned W0 = 16;
  localparam int unsigned W1 = 32;
  logic [W0-1:0] x0, y0, s0;
  logic [W1-1:0] x1, y1, s1;
  logic          cin, co0, co1;
  int checks = 0, failures = 0;

  hybrid_adder dut0 (.x(x0), .y(y0), .cin, .s(s0), .cout(co0));
  hybrid_adder #(.W(W1), .N_RCA(3)) dut1 (.x(x1), .y(y1), .cin, .s(s1), .cout(co1));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W1-1:0] xv, yv, input logic ci);
    logic [W0:0] e0;
    logic [W1:0] e1;
    x0 = xv[W0-1:0];
    y0 = yv[W0-1:0];
    x1 = xv;
    y1 = yv;
    cin = ci;
    #1;
    e0 = (W0+1)'(x0) + (W0+1)'(y0) + (W0+1)'(cin);
    e1 = (W1+1)'(x1) + (W1+1)'(y1) + (W1+1)'(cin);
    checks += 2;
    if ({co0, s0} != e0) begin
      failures++;
      $display("FAIL W=16 x=%h y=%h cin=%0d -> %h expected %h", x0, y0, cin, {co0, s0}, e0);
    end
    if ({co1, s1} != e1) begin
      failures++;
      $display("FAIL W=32 x=%h y=%h cin=%0d -> %h expected %h", x1, y1, cin, {co1, s1}, e1);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);   // carry-in ripples through every block
    apply('1, '1, 1'b1);
    apply('1, 32'd1, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int t = 0; t < 20000; t++) apply($urandom, $urandom, 1'($urandom));
    // Operands with long propagate runs: y close to ~x.
    for (int t = 0; t < 5000; t++) begin
      logic [W1-1:0] xv;
      xv = $urandom;
      apply(xv, ~xv ^ (32'd1 << ($urandom % W1)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
