// half_adder: one-bit half adder, the grey cell of the carry-save tree.
// Purely combinational: s = a ^ b, co = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
