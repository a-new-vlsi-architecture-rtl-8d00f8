// hybrid_csa: carry-save partial-product tree with the accumulator merged into it.
//
// The accumulator value A (2N bits, modulo 2^(2N)) is kept in a mixed form:
//   A = z + 2^N * (s + c)
// where z is the binary lower half and s, c are the sum and carry vectors of the upper
// half. One pass of this block computes A + x*y from the N/2 Booth partial products of
// x*y and the fed-back (z_fb, s_fb, c_fb), and returns the new (z, s, c) without ever
// running a carry across the full 2N bits.
//
// Organisation (R = N/2 partial-product rows plus one accumulation row, R+1 levels):
//   * Row 0 adds partial product P_0 to the vector {c_fb, z_fb}; both have at most two
//     bits per column, so this row is made of half adders.
//   * Row j = 1..R-1 adds P_j (placed at column 2j) to the sum and carry vectors of row
//     j-1 with full adders (half adders above P_j's last column).
//   * The carry vector of row j has a free slot in its lowest column 2j; the correction bit
//     N_j (the +1 that turns the 1's-complement P_j into 2's complement) is put there.
//   * After row j no later partial product touches columns 2j and 2j+1, so a 2-bit CLA
//     adds the row's sum and carry bits there (five inputs with the chained carry) and
//     emits z[2j+1:2j]. The first CLA's carry in is 0; the carries of the CLAs ripple
//     down through the rows.
//   * The accumulation row adds s_fb into columns N..2N-1 with full adders. The carry out
//     of the last CLA fills the free lowest slot c[0] of the new carry vector.
//   * Carries out of column 2N-1 are discarded: the accumulator wraps modulo 2^(2N).
// Sign extension of the partial products is replaced by constant bits: with s_j the sign
// bit of P_j, row 0 carries {~s_0, s_0, s_0} in columns N+2..N and row j >= 1 carries
// {1, ~s_j} in columns N+2j+1..N+2j. This is the usual constant-ones form of
// -sum_j s_j*2^(N+2j); the exact placement of those bits in the tree is this design's choice.
// The level count, the HA/FA/2-bit-CLA mix, the feedback of z, s and c, and the
// N-bit-only final adder downstream follow the architecture; the bit-level placement of
// each feedback vector in a particular row is this design's choice.
//
// Interface: pp/neg from booth_encoder, z_fb/s_fb/c_fb the previous state, z/s/c the new
// state. Combinational; the caller registers the state. Unused low bits of the internal
// row vectors are tied to 0, and the carry-vector bit 2N of every row and bit N of c_acc
// are the discarded wrap-around carries, which is why those bits have no reader.
module hybrid_csa #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]     pp [N/2],
  input  logic [N/2-1:0] neg,
  input  logic [N-1:0]   z_fb,
  input  logic [N-1:0]   s_fb,
  input  logic [N-1:0]   c_fb,
  output logic [N-1:0]   z,
  output logic [N-1:0]   s,
  output logic [N-1:0]   c
);
  localparam int unsigned R = N / 2;
  localparam int unsigned W = 2 * N;

  if ((N % 2) != 0 || N < 4) begin : g_bad_n
    $error("hybrid_csa: N must be even and at least 4");
  end

  // Partial products placed at their column, with the sign-extension constants.
  logic [W-1:0] ppx [R];
  for (genvar j = 0; j < R; j++) begin : g_ppx
    always_comb begin
      ppx[j] = '0;
      ppx[j][2*j +: N] = pp[j][N-1:0];
      if (j == 0) ppx[j][N +: 3] = {~pp[j][N], pp[j][N], pp[j][N]};
      else        ppx[j][N+2*j +: 2] = {1'b1, ~pp[j][N]};
    end
  end

  logic [W-1:0] rs [R];   // sum vector after row j
  logic [W:0]   rc [R];   // carry vector after row j (bit W: discarded carry)
  logic [R:0]   cc;       // CLA carry chain
  logic [W-1:0] a0;

  assign a0    = {c_fb, z_fb};
  assign cc[0] = 1'b0;

  // Row 0: half adders over the columns P_0 occupies, feedback passes above them.
  for (genvar i = 0; i < W; i++) begin : g_row0
    if (i <= N + 2) begin : g_ha
      half_adder u_ha (.a(a0[i]), .b(ppx[0][i]), .s(rs[0][i]), .co(rc[0][i+1]));
    end else begin : g_pass
      assign rs[0][i]   = a0[i];
      assign rc[0][i+1] = 1'b0;
    end
  end
  assign rc[0][0] = neg[0];

  // Rows 1..R-1.
  for (genvar j = 1; j < R; j++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_col
      if (i < 2 * j) begin : g_done
        assign rs[j][i] = 1'b0;
        if (i > 0) begin : g_done_c
          assign rc[j][i] = 1'b0;
        end
      end else if (i <= N + 2 * j + 1) begin : g_fa
        full_adder u_fa (.a(rs[j-1][i]), .b(rc[j-1][i]), .ci(ppx[j][i]),
                         .s(rs[j][i]), .co(rc[j][i+1]));
      end else begin : g_ha
        half_adder u_ha (.a(rs[j-1][i]), .b(rc[j-1][i]), .s(rs[j][i]), .co(rc[j][i+1]));
      end
    end
    assign rc[j][0] = 1'b0;
    assign rc[j][2*j] = neg[j];
  end

  // Two-bit CLAs finishing columns 2j and 2j+1 after row j.
  for (genvar j = 0; j < R; j++) begin : g_cla
    cla2 u_cla2 (
      .a   (rs[j][2*j +: 2]),
      .b   (rc[j][2*j +: 2]),
      .cin (cc[j]),
      .s   (z[2*j +: 2]),
      .cout(cc[j+1])
    );
  end

  // Accumulation row: add the fed-back sum vector to the upper half.
  logic [N:0] c_acc;
  for (genvar i = 0; i < N; i++) begin : g_acc
    full_adder u_fa (.a(rs[R-1][N+i]), .b(rc[R-1][N+i]), .ci(s_fb[i]),
                     .s(s[i]), .co(c_acc[i+1]));
  end
  assign c_acc[0] = cc[R];
  assign c = c_acc[N-1:0];
endmodule
