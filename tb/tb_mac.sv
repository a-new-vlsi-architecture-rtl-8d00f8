// tb_mac: end-to-end self-check of the pipelined multiplier-accumulator at its default
// size (N = 16, 32-bit accumulator), with no parameter overrides.
//
// A reference model in the testbench keeps the accumulator as a plain 2N-bit integer:
// on every clock with in_valid it becomes (acc_clr ? 0 : acc) + x*y. The DUT must raise
// out_valid exactly two clocks after each accepted operand and then show that value on p;
// in between, p must hold. Directed sequences come first (single products, a long
// back-to-back run at one operation per clock, an accumulation that wraps past the 2N-bit
// range, gaps with in_valid low), then random traffic. The testbench counts how often each
// mechanism of the design was exercised and counts a failure for any that never was:
// new accumulation (acc_clr), held state (in_valid low), back-to-back accumulation,
// wrap-around of the 2N-bit accumulator, negative Booth digits, digits of magnitude 2,
// and a carry out of the lower (binary) half into the carry-save upper half.
module tb_mac;
  localparam int N = 16;
  localparam longint MASK = (longint'(1) << (2*N)) - 1;
  localparam logic [N-1:0] MIN = {1'b1, {(N-1){1'b0}}};  // -2^(N-1)
  localparam logic [N-1:0] MAX = ~MIN;                   // 2^(N-1) - 1

  logic           clk = 1'b0;
  logic           rst_n, in_valid, acc_clr;
  logic [N-1:0]   x, y;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int n_clr = 0, n_hold = 0, n_b2b = 0, n_wrap = 0, n_neg = 0, n_two = 0, n_cla_carry = 0;
  int n_ops = 0;

  mac dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clr(acc_clr),
           .x(x), .y(y), .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and 2-clock expectation pipeline
  longint acc = 0;          // reference accumulator, masked to 2N bits
  logic   v_pipe [2];
  longint e_pipe [2];
  longint last_p = 0;
  int     run = 0;          // current run of back-to-back valid operands

  function automatic longint digit(input longint xv, input int j);
    longint xm1, x0, x1;
    xm1 = (j == 0) ? 0 : ((xv >> (2*j-1)) & 1);
    x0  = (xv >> (2*j)) & 1;
    x1  = (xv >> (2*j+1)) & 1;
    return -2*x1 + x0 + xm1;
  endfunction

  // Sample the inputs at the clock edge exactly as the DUT does.
  always @(posedge clk) begin
    if (rst_n) begin
      // check the output produced by this edge's predecessor state
      checks++;
      if (out_valid !== v_pipe[1]) begin
        failures++;
        $display("FAIL t=%0t out_valid=%0b expected %0b", $time, out_valid, v_pipe[1]);
      end else if (out_valid) begin
        if (longint'(p) != e_pipe[1]) begin
          failures++;
          $display("FAIL t=%0t p=%h expected %h", $time, p, e_pipe[1]);
        end
        last_p = longint'(p);
      end else if (longint'(p) != last_p) begin
        failures++;
        $display("FAIL t=%0t p changed to %h without out_valid", $time, p);
      end

      // advance the reference
      v_pipe[1] <= v_pipe[0];
      e_pipe[1] <= e_pipe[0];
      v_pipe[0] <= in_valid;
      if (in_valid) begin
        longint prod, acc_in, sum_wide;
        prod   = longint'($signed(x)) * longint'($signed(y));
        acc_in = acc_clr ? 0 : acc;
        // signed 2N-bit overflow: the exact sum leaves [-2^(2N-1), 2^(2N-1))
        sum_wide = ((acc_in & (longint'(1) << (2*N-1))) != 0 ? acc_in - (MASK + 1) : acc_in) + prod;
        if (sum_wide >= (longint'(1) << (2*N-1)) || sum_wide < -(longint'(1) << (2*N-1))) n_wrap++;
        acc = (acc_in + prod) & MASK;
        e_pipe[0] <= acc;
        n_ops++;
        if (acc_clr) n_clr++;
        run++;
        if (run >= 2) n_b2b++;
        for (int j = 0; j < N/2; j++) begin
          if (digit(longint'(x), j) < 0) n_neg++;
          if (digit(longint'(x), j) == 2 || digit(longint'(x), j) == -2) n_two++;
        end
        // the lower half of the sum carries into the upper half
        if (((acc_in & ((longint'(1) << N) - 1)) + (prod & ((longint'(1) << N) - 1))) >= (longint'(1) << N))
          n_cla_carry++;
      end else begin
        run = 0;
        n_hold++;
      end
    end
  end

  task automatic op(input logic v, input logic clr, input logic [N-1:0] a, input logic [N-1:0] b);
    @(negedge clk);
    in_valid = v; acc_clr = clr; x = a; y = b;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; acc_clr = 1'b0; x = '0; y = '0;
    v_pipe[0] = 1'b0; v_pipe[1] = 1'b0; e_pipe[0] = 0; e_pipe[1] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // single products, each starting a new accumulation, with gaps
    op(1, 1, N'(3), N'(5));      op(0, 0, '0, '0);
    op(1, 1, N'(-1), N'(7));   op(0, 0, '0, '0); op(0, 0, '0, '0);
    op(1, 1, MIN, MIN); op(0, 0, '0, '0);
    // dot product of 16 terms, one per clock
    op(1, 1, N'(1), N'(1));
    for (int i = 2; i <= 16; i++) op(1, 0, N'(i), N'(-i));
    op(0, 0, '0, '0); op(0, 0, '0, '0);
    // wrap-around: (-2^(N-1))^2 = 2^(2N-2) accumulated five times leaves the signed 2N-bit range
    op(1, 1, MIN, MIN);
    for (int i = 0; i < 4; i++) op(1, 0, MIN, MIN);
    op(0, 0, '0, '0);
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      logic [N-1:0] a, b;
      int k;
      k = int'($urandom_range(0, 3));
      a = (k == 0) ? MIN : (k == 1) ? MAX : N'($urandom);
      b = ($urandom_range(0, 3) == 0) ? MIN : N'($urandom);
      op($urandom_range(0, 9) < 7, $urandom_range(0, 19) == 0, a, b);
    end
    op(0, 0, '0, '0);
    repeat (4) @(posedge clk);

    $display("mechanisms: ops=%0d clr=%0d hold=%0d back_to_back=%0d wrap=%0d neg_digits=%0d two_digits=%0d cla_carry_into_upper=%0d",
             n_ops, n_clr, n_hold, n_b2b, n_wrap, n_neg, n_two, n_cla_carry);
    if (n_clr == 0)       begin failures++; $display("FAIL acc_clr never exercised"); end
    if (n_hold == 0)      begin failures++; $display("FAIL hold never exercised"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL back-to-back accumulation never exercised"); end
    if (n_wrap == 0)      begin failures++; $display("FAIL wrap-around never exercised"); end
    if (n_neg == 0)       begin failures++; $display("FAIL negative digits never exercised"); end
    if (n_two == 0)       begin failures++; $display("FAIL digits of magnitude 2 never exercised"); end
    if (n_cla_carry == 0) begin failures++; $display("FAIL CLA carry into upper half never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
