// tb_booth_encoder: self-check of the radix-4 Booth recoder and partial-product generator.
// For every digit j the testbench recomputes the digit d_j = -2*x[2j+1] + x[2j] + x[2j-1]
// from x on its own and checks that the (N+1)-bit 2's complement value of pp[j], plus the
// correction bit neg[j], equals d_j * y; it also checks that sum_j (pp[j]+neg[j]) * 4^j
// equals x*y. Runs N = 16 (default) with random and corner operands, and N = 8 exhaustively.
module tb_booth_encoder;
  localparam int N = 16;
  logic [N-1:0]   x, y;
  logic [N:0]     pp [N/2];
  logic [N/2-1:0] neg;
  logic [7:0]     x8, y8;
  logic [8:0]     pp8 [4];
  logic [3:0]     neg8;
  int checks = 0, failures = 0;

  booth_encoder dut (.x(x), .y(y), .pp(pp), .neg(neg));
  booth_encoder #(.N(8)) dut8 (.x(x8), .y(y8), .pp(pp8), .neg(neg8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint digit(input longint xv, input int j);
    longint xm1, x0, x1;
    xm1 = (j == 0) ? 0 : ((xv >> (2*j-1)) & 1);
    x0  = (xv >> (2*j)) & 1;
    x1  = (xv >> (2*j+1)) & 1;
    return -2*x1 + x0 + xm1;
  endfunction

  task automatic check16(input logic [N-1:0] a, input logic [N-1:0] b);
    longint total, term;
    bit ok;
    x = a; y = b;
    #1;
    total = 0;
    ok = 1;
    for (int j = 0; j < N/2; j++) begin
      term = longint'($signed(pp[j])) + longint'(neg[j]);
      total += term <<< (2*j);
      if (term != digit(longint'(a), j) * longint'($signed(b))) ok = 0;
    end
    checks++;
    if (!ok || total != longint'($signed(a)) * longint'($signed(b))) begin
      failures++;
      $display("FAIL N=16 x=%h y=%h total=%0d", a, b, total);
    end
  endtask

  task automatic check8(input logic [7:0] a, input logic [7:0] b);
    longint total, term;
    bit ok;
    x8 = a; y8 = b;
    #1;
    total = 0;
    ok = 1;
    for (int j = 0; j < 4; j++) begin
      term = longint'($signed(pp8[j])) + longint'(neg8[j]);
      total += term <<< (2*j);
      if (term != digit(longint'(a), j) * longint'($signed(b))) ok = 0;
    end
    checks++;
    if (!ok || total != longint'($signed(a)) * longint'($signed(b))) begin
      failures++;
      $display("FAIL N=8 x=%h y=%h total=%0d", a, b, total);
    end
  endtask

  initial begin
    check16(16'h8000, 16'h8000);
    check16(16'h7FFF, 16'h8000);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'h1234);
    check16(16'hAAAA, 16'h5555);
    check16(16'h5555, 16'h0000);
    for (int i = 0; i < 5000; i++) check16(N'($urandom), N'($urandom));
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) check8(8'(a), 8'(b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
