// Montgomery (least-significant-coefficient-first) GF(2^n) accumulator.
//
// Holds the partial result rm and, on every enabled clock, performs one
// iteration of the bit-serial Montgomery multiplier over GF(2^n):
//     t  <- rm xor (a_i and b)
//     t  <- (t_0 and f(x)) xor t      -- makes the x^0 coefficient zero
//     rm <- t / x                     -- right shift
// Feeding a_0, a_1, ... over k cycles leaves rm = (a_0 + .. + a_{k-1}x^{k-1})
// * b * x^-k mod f(x). The iteration rule is the standard bit-serial
// Montgomery one; folding the x^n term into the shift is this RTL's reading.
//
// Interface: f carries f_0..f_{n-1} with the leading f_n = 1 implicit, so
// adding f(x) when t_0 = 1 clears bit 0 (f_0 must be 1, as it is for every
// irreducible f) and sets the x^n term, which the right shift moves into
// bit n-1. 'clear' zeroes rm and takes priority over 'en'; rst_n is an
// asynchronous reset to zero (a choice of this RTL).
// Timing: one iteration per clock, result visible the cycle after 'en'.
module gf2n_montgomery_core #(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         a_bit,
  input  logic [N-1:0] b,
  input  logic [N-1:0] f,   // f[0] is taken to be 1 and not read
  output logic [N-1:0] r
);

  logic [N-1:0] t_add;
  logic [N-1:1] t_red;     // bit 0 of t xor f is zero by construction
  logic [N-1:0] r_next;

  always_comb begin
    t_add  = a_bit ? (r ^ b) : r;                 // add a_i * b
    t_red  = t_add[0] ? (t_add[N-1:1] ^ f[N-1:1])  // add f(x) when t_0 = 1
                      : t_add[N-1:1];
    r_next = {t_add[0], t_red};                   // divide by x; x^n term -> bit n-1
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (clear) r <= '0;
    else if (en)    r <= r_next;
  end

endmodule
