// final_adder: N-bit adder for the upper half of the accumulated result.
//
// The accumulator keeps its upper N bits in carry-save form (a sum vector s and a carry
// vector c). This block resolves them into binary, p = (s + c) mod 2^N, which is the
// upper half P[2N-1:N] of the 2N-bit result. It is built from N/4 four-bit carry
// look-ahead blocks whose carries ripple from one block to the next (carry in of the
// first block is 0, carry out of the last is discarded: the result wraps modulo 2^(2N)
// like the accumulator). The adder being N bits wide, rather than 2N, is the point of
// the architecture; the ripple of 4-bit look-ahead blocks follows its delay model and
// the rest is this design's choice.
//
// Interface: s, c in; p out. Combinational. N must be a multiple of 4. The top bit of the
// carry chain is the discarded carry out and has no reader.
module final_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N-1:0] p
);
  localparam int unsigned NB = N / 4;

  if ((N % 4) != 0 || N < 4) begin : g_bad_n
    $error("final_adder: N must be a multiple of 4");
  end

  logic [NB:0] carry;
  assign carry[0] = 1'b0;

  for (genvar b = 0; b < NB; b++) begin : g_blk
    cla4 u_cla4 (
      .a   (s[4*b +: 4]),
      .b   (c[4*b +: 4]),
      .cin (carry[b]),
      .s   (p[4*b +: 4]),
      .cout(carry[b+1])
    );
  end
endmodule
