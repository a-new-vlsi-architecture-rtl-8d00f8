// mac: two-stage pipelined multiplier-accumulator with a carry-save accumulator.
//
// Computes P <= P + x*y (2's complement, N x N bits into a 2N-bit accumulator that wraps
// modulo 2^(2N)) at one multiply-accumulate per clock. The key idea is that the
// accumulator is not the output of an adder: the state registers hold the lower half z in
// binary and the upper half as a sum vector s and a carry vector c, exactly as the hybrid
// carry-save tree produces them. Each new product is compressed together with that state,
// so no carry-propagating 2N-bit addition sits in the accumulation loop.
//
//   stage 1 (loop):   booth_encoder -> hybrid_csa -> state registers {z_q, s_q, c_q}
//   stage 2 (output): final_adder resolves s_q + c_q (N bits only) -> p = {s_q + c_q, z_q}
//
// Interface and timing:
//   in_valid  - accept x, y this clock; the state is updated at the clock edge. With
//               in_valid low the state holds.
//   acc_clr   - (with in_valid) start a new accumulation: the fed-back state is taken as
//               zero, so the state becomes x*y.
//   out_valid - p holds the accumulated value including the operand accepted two clocks
//               earlier. A new operand can be accepted every clock; out_valid follows
//               in_valid with a latency of two clocks. p is only reloaded when stage 1
//               has taken a new operand, so the final adder's result is captured only when
//               there is something new to report.
//   rst_n     - asynchronous, active low; clears the state (accumulated value 0) and
//               out_valid.
// The two stages, the state fed back as (z, s, c) and the one-operation-per-clock rate
// follow the architecture. The in_valid/acc_clr controls, the reset and the output register
// are this design's choices. N must be a multiple of 4.
module mac
  import mac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           acc_clr,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           out_valid,
  output logic [2*N-1:0] p
);
  localparam int unsigned R = N / 2;

  // ---------------- stage 1: Booth encoding, CSA and accumulation ----------------
  logic [N:0]   pp [R];
  logic [R-1:0] neg;
  logic [N-1:0] z_q, s_q, c_q;        // accumulator state
  logic [N-1:0] z_fb, s_fb, c_fb;     // state as fed back (zero on acc_clr)
  logic [N-1:0] z_d, s_d, c_d;        // next state
  logic         v1_q;                 // stage 1 holds a newly accumulated value

  booth_encoder #(.N(N)) u_booth (.x(x), .y(y), .pp(pp), .neg(neg));

  always_comb begin
    z_fb = acc_clr ? '0 : z_q;
    s_fb = acc_clr ? '0 : s_q;
    c_fb = acc_clr ? '0 : c_q;
  end

  hybrid_csa #(.N(N)) u_csa (
    .pp(pp), .neg(neg),
    .z_fb(z_fb), .s_fb(s_fb), .c_fb(c_fb),
    .z(z_d), .s(s_d), .c(c_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_q  <= '0;
      s_q  <= '0;
      c_q  <= '0;
      v1_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        z_q <= z_d;
        s_q <= s_d;
        c_q <= c_d;
      end
    end
  end

  // ---------------- stage 2: final addition of the upper half ----------------
  logic [N-1:0] hi;

  final_adder #(.N(N)) u_fadd (.s(s_q), .c(c_q), .p(hi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) p <= {hi, z_q};
    end
  end
endmodule
