// tb_adder_widths: the three-operand adder at the wider operand sizes the
// design is meant to scale to, 32, 64 and 128 bits. Random and directed
// operands (all ones, a single carry that ripples through every block) are
// applied to all three instances and checked against a + b + c + cin.
module tb_adder_widths;
  localparam int unsigned NMAX = 128;
  logic [31:0]  a32, b32, c32;
  logic [63:0]  a64, b64, c64;
  logic [127:0] a128, b128, c128;
  logic [32:0]  s32;
  logic [64:0]  s64;
  logic [128:0] s128;
  logic         cin, co32, co64, co128;
  int checks = 0, failures = 0;

  three_operand_adder #(.N(32))  dut32  (.a(a32),  .b(b32),  .c(c32),  .cin, .s(s32),  .cout(co32));
  three_operand_adder #(.N(64))  dut64  (.a(a64),  .b(b64),  .c(c64),  .cin, .s(s64),  .cout(co64));
  three_operand_adder #(.N(128)) dut128 (.a(a128), .b(b128), .c(c128), .cin, .s(s128), .cout(co128));

  function automatic logic [NMAX-1:0] rand_word();
    logic [NMAX-1:0] v;
    for (int i = 0; i < NMAX / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [NMAX-1:0] av, bv, cv, input logic ci);
    logic [33:0]  e32;
    logic [65:0]  e64;
    logic [129:0] e128;
    a32 = av[31:0];  b32 = bv[31:0];  c32 = cv[31:0];
    a64 = av[63:0];  b64 = bv[63:0];  c64 = cv[63:0];
    a128 = av;       b128 = bv;       c128 = cv;
    cin = ci;
    #1;
    e32  = 34'(a32) + 34'(b32) + 34'(c32) + 34'(cin);
    e64  = 66'(a64) + 66'(b64) + 66'(c64) + 66'(cin);
    e128 = 130'(a128) + 130'(b128) + 130'(c128) + 130'(cin);
    checks += 3;
    if ({co32, s32} != e32) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h c=%h cin=%0d", a32, b32, c32, cin);
    end
    if ({co64, s64} != e64) begin
      failures++;
      $display("FAIL N=64 a=%h b=%h c=%h cin=%0d", a64, b64, c64, cin);
    end
    if ({co128, s128} != e128) begin
      failures++;
      $display("FAIL N=128 a=%h b=%h c=%h cin=%0d", a128, b128, c128, cin);
    end
  endtask

  initial begin
    apply('0, '0, '0, 1'b0);
    apply('1, '0, '0, 1'b1);
    apply('1, '1, '1, 1'b1);
    apply('1, '1, '0, 1'b0);
    for (int t = 0; t < 5000; t++) apply(rand_word(), rand_word(), rand_word(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
