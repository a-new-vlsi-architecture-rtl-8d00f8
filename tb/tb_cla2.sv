// tb_cla2: exhaustive self-check of the 2-bit carry look-ahead adder.
// All 32 combinations of a, b, cin are applied; {cout, s} must equal a + b + cin,
// computed here with integer arithmetic.
module tb_cla2;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla2 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, b, a} = 5'(v);
      #1;
      checks++;
      if ({cout, s} !== 3'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d s=%0d", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
