// Classical (most-significant-coefficient-first) GF(2^n) accumulator.
//
// Holds the partial result rc and, on every enabled clock, performs one
// iteration of the classical polynomial-basis multiplier:
//     rc <- (rc_{n-1} and f) xor (rc * x) xor (a_i and b)
// i.e. a left shift, a conditional reduction by the field polynomial (the
// coefficient shifted out of position n-1 stands for x^n, which is replaced
// by f_{n-1} x^{n-1} + ... + f_0), and a conditional add of b. Feeding the
// coefficients of a from a_{n-1} down to a_0 over n cycles leaves
// rc = a*b mod f(x); the split multiplier feeds only the high half of a.
// The iteration rule is the standard classical multiplier's; the clear/en
// controls are this RTL's.
//
// Interface: f carries f_0..f_{n-1}; the leading coefficient f_n = 1 is
// implicit. 'clear' zeroes rc and takes priority over 'en'. Both are
// synchronous; rst_n is an asynchronous reset to zero (a choice of this RTL).
// Timing: one iteration per clock, result visible the cycle after 'en'.
module gf2n_classical_core #(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         a_bit,
  input  logic [N-1:0] b,
  input  logic [N-1:0] f,
  output logic [N-1:0] r
);

  logic [N-1:0] r_next;

  always_comb begin
    r_next = {r[N-2:0], 1'b0};           // r * x
    if (r[N-1]) r_next = r_next ^ f;     // x^n replaced by f_low
    if (a_bit)  r_next = r_next ^ b;     // add a_i * b
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (clear) r <= '0;
    else if (en)    r <= r_next;
  end

endmodule
