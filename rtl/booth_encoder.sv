// booth_encoder: radix-4 modified Booth recoding and 1's-complement partial products.
//
// The N-bit 2's complement multiplier x is split into N/2 overlapping triplets
// {x[2j+1], x[2j], x[2j-1]} (x[-1] = 0), each recoded into a digit
// d_j = -2*x[2j+1] + x[2j] + x[2j-1] in {-2..2}, so that x*y = sum_j d_j * 4^j * y.
// For every digit the block selects 0, y or 2*y as an (N+1)-bit multiple (y sign-extended
// by one bit, or shifted left by one) and, for a negative digit, inverts it. The result
// pp[j] is therefore the 1's complement of d_j*y; bit N is its sign. The missing +1 is
// output as neg[j] (the correction bit N_j) and is added at weight 4^j by the carry-save
// tree, so pp[j] + neg[j] == d_j*y exactly. The digit-in-{-2..2} recoding, the 1's
// complement partial products and the separate correction bit follow the architecture;
// the select-line encoding (see mac_pkg) is this design's choice.
//
// Interface: x, y in; pp[N/2] (N+1 bits each) and neg[N/2] out. Combinational.
// N must be even. Since x[-1] = 0, neg[0] reduces to x[1].
module booth_encoder
  import mac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   pp [N/2],
  output logic [N/2-1:0] neg
);
  localparam int unsigned R = N / 2;

  if ((N % 2) != 0 || N < 4) begin : g_bad_n
    $error("booth_encoder: N must be even and at least 4");
  end

  logic [N:0] x_ext;  // {x, 0}: x_ext[i+1] = x[i], x_ext[0] = x[-1] = 0
  assign x_ext = {x, 1'b0};

  for (genvar j = 0; j < R; j++) begin : g_digit
    booth_sel_t sel;
    logic [N:0] mult;
    always_comb begin
      sel  = booth_recode(x_ext[2*j +: 3]);
      mult = sel.one ? {y[N-1], y} : (sel.two ? {y, 1'b0} : '0);
      pp[j]  = mult ^ {(N+1){sel.neg}};
      neg[j] = sel.neg;
    end
  end
endmodule
