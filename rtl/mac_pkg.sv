// mac_pkg: types and helpers shared by the Booth-encoded multiplier-accumulator.
//
// A radix-4 modified Booth digit d = -2*x[2j+1] + x[2j] + x[2j-1] takes a value in
// {-2,-1,0,+1,+2}. It is carried between modules as three select lines: "one" picks the
// multiplicand, "two" picks the multiplicand shifted left by one, and "neg" asks for the
// bitwise complement (1's complement) of the picked multiple. The +1 that completes the
// 2's complement negation is not added here; it travels separately as the correction bit
// N_j and is absorbed by the carry-save tree. The bit triplet 3'b111 encodes d = 0 and is
// given neg = 0 so that a zero digit never produces a negative zero; this is a choice of
// this design.
package mac_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: complement the selected multiple
    logic two;  // |d| == 2
    logic one;  // |d| == 1
  } booth_sel_t;

  // Recode the triplet {x[2j+1], x[2j], x[2j-1]} into select lines.
  function automatic booth_sel_t booth_recode(input logic [2:0] trip);
    booth_sel_t r;
    r.one = trip[1] ^ trip[0];
    r.two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
    r.neg = trip[2] & ~(trip[1] & trip[0]);
    return r;
  endfunction

endpackage
