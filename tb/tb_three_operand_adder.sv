// tb_three_operand_adder: end-to-end test of the three-operand adder at its
// default parameters (16-bit operands). Random and directed operands are
// applied and {cout, s} is compared with a + b + c + cin.
// The test also counts how often each mechanism of the design is exercised,
// working the internal carries out from the operands on its own side:
//   cin_used       the carry-in is 1
//   csa_carries    the carry-save row produces a carry vector that is not 0
//   rca_carry1     a ripple-type block above block 0 receives a carry of 1
//   csl_sel1/0     a carry-select block selects its carry-1 / carry-0 chain
//   full_ripple    a carry from cin travels through every block
//   msb_carry      the half adder at the MSB produces cout = 1
// A mechanism that never occurs counts as a failure.
module tb_three_operand_adder;
  localparam int unsigned N     = adder_pkg::DEFAULT_WIDTH;
  localparam int unsigned BW    = adder_pkg::SUM_BLOCK_W;
  localparam int unsigned NB    = N / BW;
  localparam int unsigned N_RCA = NB / 2;

  logic [N-1:0] a, b, c;
  logic         cin, cout;
  logic [N:0]   s;
  int checks = 0, failures = 0;
  int cin_used = 0, csa_carries = 0, rca_carry1 = 0, csl_sel1 = 0, csl_sel0 = 0;
  int full_ripple = 0, msb_carry = 0;

  three_operand_adder dut (.a, .b, .c, .cin, .s, .cout);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] av, bv, cv, input logic ci);
    logic [N+1:0] exp_sum;
    logic [N-1:0] sv, cvv, yv;
    logic [N:0]   partial;
    a = av;
    b = bv;
    c = cv;
    cin = ci;
    #1;
    exp_sum = (N+2)'(a) + (N+2)'(b) + (N+2)'(c) + (N+2)'(cin);
    checks++;
    if ({cout, s} != exp_sum) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h cin=%0d -> %h expected %h", a, b, c, cin, {cout, s}, exp_sum);
    end
    // Mechanism bookkeeping.
    sv  = a ^ b ^ c;
    cvv = (a & b) | (a & c) | (b & c);
    yv  = cvv << 1;
    if (cin) cin_used++;
    if (cvv != '0) csa_carries++;
    for (int k = 1; k < NB; k++) begin
      logic bc;
      partial = (N+1)'(sv & ((N'(1) << (k * BW)) - 1)) + (N+1)'(yv & ((N'(1) << (k * BW)) - 1))
              + (N+1)'(cin);
      bc = partial[k * BW];
      if (k < N_RCA && bc) rca_carry1++;
      if (k >= N_RCA) begin
        if (bc) csl_sel1++;
        else    csl_sel0++;
      end
    end
    if (cin && ((sv ^ yv) == '1)) full_ripple++;
    if (cout) msb_carry++;
  endtask

  initial begin
    apply('0, '0, '0, 1'b0);
    apply('1, '0, '0, 1'b1);
    apply('1, '1, '1, 1'b1);
    apply('1, '1, '0, 1'b0);
    for (int t = 0; t < 20000; t++)
      apply(N'($urandom), N'($urandom), N'($urandom), 1'($urandom));
    $display("mechanisms: cin_used=%0d csa_carries=%0d rca_carry1=%0d csl_sel1=%0d csl_sel0=%0d full_ripple=%0d msb_carry=%0d",
             cin_used, csa_carries, rca_carry1, csl_sel1, csl_sel0, full_ripple, msb_carry);
    checks += 7;
    if (cin_used == 0)    begin failures++; $display("FAIL carry-in never used"); end
    if (csa_carries == 0) begin failures++; $display("FAIL carry-save carries never seen"); end
    if (rca_carry1 == 0)  begin failures++; $display("FAIL ripple block never got a carry"); end
    if (csl_sel1 == 0)    begin failures++; $display("FAIL carry-1 chain never selected"); end
    if (csl_sel0 == 0)    begin failures++; $display("FAIL carry-0 chain never selected"); end
    if (full_ripple == 0) begin failures++; $display("FAIL no full-length carry ripple"); end
    if (msb_carry == 0)   begin failures++; $display("FAIL MSB carry-out never 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
