// cla4: four-bit carry look-ahead adder with carry input.
//
// All four internal carries and the carry out are computed directly from the
// generate (a & b) and propagate (a ^ b) terms and the carry in, so the carry path
// through the block is one look-ahead level. Several of these blocks with their
// carries chained form the final adder. Combinational, no clock. The gate equations
// are the textbook look-ahead form; only the block's size (4 bits) is given by the
// architecture.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    s    = p ^ c[3:0];
    cout = c[4];
  end
endmodule
