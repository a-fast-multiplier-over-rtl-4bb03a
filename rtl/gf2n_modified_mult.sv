// Fast polynomial-basis multiplier over GF(2^n): r = a * b * x^-M mod f(x).
//
// Operand a is split in two. Its high K = ceil(n/2) coefficients go, most
// significant first, into a classical shift-left-and-reduce accumulator
// (rc); its low M = floor(n/2) coefficients go, least significant first,
// into a Montgomery shift-right-and-reduce accumulator (rm). Both run in
// the same clock cycles, so the product needs K cycles instead of the n
// of either accumulator alone. At the end
//     rc = a_hi * b mod f,    rm = a_lo * b * x^-M mod f,
// with a = a_hi * x^M + a_lo, hence rc xor rm = a * b * x^-M mod f.
// Working in the representation M(a) = a * x^M mod f makes the multiplier
// map M(a), M(b) to M(ab); conversion in is a multiplication by
// x^(2M) mod f and conversion out a multiplication by 1.
// The algorithm, the split and the cycle count follow the published split-multiplier method;
// the operand registers, handshake and reset are this RTL's choices.
//
// Interface:
//   f      coefficients f_0..f_{n-1}; f_n = 1 implicit, f_0 must be 1.
//   start  sampled while idle: a, b and f are captured at that edge.
//   busy   high during the K iteration cycles.
//   done   one-cycle pulse K+1 edges after the start edge; r is valid from
//          then on and holds until the next start.
//   r      rc xor rm (combinational XOR of the two result registers).
module gf2n_modified_mult
  import gf2n_pkg::*;
#(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] f,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] r
);

  localparam int unsigned K = clas_bits(N);
  localparam int unsigned M = mont_bits(N);

  logic         load, step_c, step_m;
  logic [K-1:0] a_hi;      // a_{n-1} .. a_M, shifted out at the top
  logic [M-1:0] a_lo;      // a_{M-1} .. a_0, shifted out at the bottom
  logic [N-1:0] b_q, f_q;
  logic [N-1:0] rc, rm;

  gf2n_mult_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start,
    .load, .step_c, .step_m, .busy, .done
  );

  // Operand registers: a is consumed from both ends at once.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_hi <= '0;
      a_lo <= '0;
      b_q  <= '0;
      f_q  <= '0;
    end else if (load) begin
      a_hi <= a[N-1:M];
      a_lo <= a[M-1:0];
      b_q  <= b;
      f_q  <= f;
    end else begin
      if (step_c) a_hi <= a_hi << 1;
      if (step_m) a_lo <= a_lo >> 1;
    end
  end

  gf2n_classical_core #(.N(N)) u_rc (
    .clk, .rst_n, .clear(load), .en(step_c),
    .a_bit(a_hi[K-1]), .b(b_q), .f(f_q), .r(rc)
  );

  gf2n_montgomery_core #(.N(N)) u_rm (
    .clk, .rst_n, .clear(load), .en(step_m),
    .a_bit(a_lo[0]), .b(b_q), .f(f_q), .r(rm)
  );

  assign r = rc ^ rm;

endmodule
