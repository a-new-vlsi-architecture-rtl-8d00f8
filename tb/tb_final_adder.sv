// tb_final_adder: self-check of the N-bit final adder at its default width (16) and at 8.
// Corner operands (all ones, carry chains across every 4-bit block boundary) and random
// operands are applied; p must equal (s + c) mod 2^N computed with integer arithmetic.
module tb_final_adder;
  localparam int N = 16;
  logic [N-1:0] s, c, p;
  logic [7:0]   s8, c8, p8;
  int checks = 0, failures = 0;

  final_adder dut (.s(s), .c(c), .p(p));
  final_adder #(.N(8)) dut8 (.s(s8), .c(c8), .p(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [N-1:0] exp16;
    logic [7:0]   exp8;
    s = a; c = b; s8 = a[7:0]; c8 = b[7:0];
    #1;
    exp16 = N'(longint'(a) + longint'(b));
    exp8  = 8'(int'(a[7:0]) + int'(b[7:0]));
    checks += 2;
    if (p !== exp16) begin
      failures++;
      $display("FAIL N=16 %h + %h = %h, got %h", a, b, exp16, p);
    end
    if (p8 !== exp8) begin
      failures++;
      $display("FAIL N=8 %h + %h = %h, got %h", a[7:0], b[7:0], exp8, p8);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, 16'h0001);
    check('1, '1);
    check(16'h0FFF, 16'h0001);
    check(16'h00F0, 16'h0010);
    check(16'h7FFF, 16'h0001);
    check(16'h8000, 16'h8000);
    for (int i = 0; i < 3000; i++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
