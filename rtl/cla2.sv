// cla2: two-bit carry look-ahead adder with carry input.
//
// In the hybrid carry-save tree every row of full adders leaves its two lowest columns
// finished: no later partial product reaches them. This five-input block (a[1:0], b[1:0],
// cin) adds the row's sum and carry bits in those two columns, emits two final result bits
// of the accumulator's lower half, and passes its carry to the block of the next row.
// The carry out is formed from generate/propagate terms in one level (g1 | p1&g0 | p1&p0&cin),
// so the chain of these blocks through the rows is the carry path of the lower half.
// Combinational, no clock. The use of a 2-bit CLA at this point follows the architecture;
// the gate equations are the textbook look-ahead form.
module cla2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);
  logic [1:0] g, p;
  logic       c1;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    c1   = g[0] | (p[0] & cin);
    cout = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    s    = p ^ {c1, cin};
  end
endmodule
