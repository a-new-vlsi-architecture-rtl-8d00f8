// tb_hybrid_csa: self-check of the carry-save tree with the merged accumulator.
// The testbench forms the Booth partial products itself (pp[j] = d_j*y - N_j as an
// (N+1)-bit 2's complement number, N_j = 1 for negative digits), applies them with a random
// fed-back state (z_fb, s_fb, c_fb), and checks that the returned state represents
//   z + 2^N*(s + c) == z_fb + 2^N*(s_fb + c_fb) + x*y   (mod 2^(2N)).
// Runs N = 16 (default) and N = 8, with corner and random operands and states.
module tb_hybrid_csa;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- N = 16 ----
  localparam int N = 16;
  logic [N:0]     pp [N/2];
  logic [N/2-1:0] neg;
  logic [N-1:0]   zf, sf, cf, z, s, c;
  hybrid_csa dut (.pp(pp), .neg(neg), .z_fb(zf), .s_fb(sf), .c_fb(cf), .z(z), .s(s), .c(c));

  // ---- N = 8 ----
  logic [8:0] pp8 [4];
  logic [3:0] neg8;
  logic [7:0] zf8, sf8, cf8, z8, s8, c8;
  hybrid_csa #(.N(8)) dut8 (.pp(pp8), .neg(neg8), .z_fb(zf8), .s_fb(sf8), .c_fb(cf8),
                            .z(z8), .s(s8), .c(c8));

  function automatic longint digit(input longint xv, input int j);
    longint xm1, x0, x1;
    xm1 = (j == 0) ? 0 : ((xv >> (2*j-1)) & 1);
    x0  = (xv >> (2*j)) & 1;
    x1  = (xv >> (2*j+1)) & 1;
    return -2*x1 + x0 + xm1;
  endfunction

  task automatic run16(input logic [N-1:0] xv, input logic [N-1:0] yv,
                       input logic [N-1:0] a, input logic [N-1:0] b, input logic [N-1:0] d);
    longint dj, expv, got;
    longint mask = (longint'(1) << (2*N)) - 1;
    for (int j = 0; j < N/2; j++) begin
      dj = digit(longint'(xv), j);
      neg[j] = (dj < 0);
      pp[j]  = (N+1)'(dj * longint'($signed(yv)) - longint'(dj < 0));
    end
    zf = a; sf = b; cf = d;
    #1;
    expv = (longint'(a) + (longint'(b) << N) + (longint'(d) << N)
            + longint'($signed(xv)) * longint'($signed(yv))) & mask;
    got  = (longint'(z) + (longint'(s) << N) + (longint'(c) << N)) & mask;
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL N=16 x=%h y=%h state=%h/%h/%h exp=%h got=%h", xv, yv, a, b, d, expv, got);
    end
  endtask

  task automatic run8(input logic [7:0] xv, input logic [7:0] yv,
                      input logic [7:0] a, input logic [7:0] b, input logic [7:0] d);
    longint dj, expv, got;
    for (int j = 0; j < 4; j++) begin
      dj = digit(longint'(xv), j);
      neg8[j] = (dj < 0);
      pp8[j]  = 9'(dj * longint'($signed(yv)) - longint'(dj < 0));
    end
    zf8 = a; sf8 = b; cf8 = d;
    #1;
    expv = (longint'(a) + (longint'(b) << 8) + (longint'(d) << 8)
            + longint'($signed(xv)) * longint'($signed(yv))) & 64'hFFFF;
    got  = (longint'(z8) + (longint'(s8) << 8) + (longint'(c8) << 8)) & 64'hFFFF;
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL N=8 x=%h y=%h state=%h/%h/%h exp=%h got=%h", xv, yv, a, b, d, expv, got);
    end
  endtask

  initial begin
    run16('0, '0, '0, '0, '0);
    run16(16'h8000, 16'h8000, '1, '1, '1);
    run16(16'hFFFF, 16'h0001, '0, '0, '0);
    run16(16'h7FFF, 16'h7FFF, '1, '0, '0);
    run16(16'h0001, 16'hFFFF, 16'h0001, '0, '0);
    run8(8'h80, 8'h80, 8'hFF, 8'hFF, 8'hFF);
    run8(8'hFF, 8'hFF, 8'h00, 8'h00, 8'h00);
    for (int i = 0; i < 20000; i++) begin
      run16(N'($urandom), N'($urandom), N'($urandom), N'($urandom), N'($urandom));
      run8(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
