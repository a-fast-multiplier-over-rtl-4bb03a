// Reference arithmetic over GF(2)[x] for the multiplier testbenches.
//
// Polynomials of degree below W are held in W-bit vectors, coefficient of
// x^i in bit i. The field polynomial is given as its low coefficients
// f_0..f_{n-1} plus the degree n (the x^n coefficient is implicit).
// mulmod() forms the full carry-less product and then reduces it by long
// division from the top degree down, which is a different procedure from
// the interleaved shift-and-reduce of the hardware.
package gf2n_ref_pkg;

  localparam int W = 512;
  typedef logic [W-1:0]   poly_t;
  typedef logic [2*W-1:0] dpoly_t;

  // Keep only the n low coefficients.
  function automatic poly_t trunc(poly_t p, int n);
    poly_t m;
    m = '0;
    for (int i = 0; i < n; i++) m[i] = 1'b1;
    return p & m;
  endfunction

  // a * b mod (x^n + f_low), a and b of degree below n.
  function automatic poly_t mulmod(poly_t a, poly_t b, poly_t f_low, int n);
    dpoly_t p, fl;
    p = '0;
    for (int i = 0; i < n; i++)
      if (a[i]) p = p ^ (dpoly_t'(b) << i);
    fl = dpoly_t'(trunc(f_low, n));
    fl[n] = 1'b1;
    for (int d = 2 * n - 2; d >= n; d--)
      if (p[d]) p = p ^ (fl << (d - n));
    return poly_t'(p);
  endfunction

  // x^e mod (x^n + f_low).
  function automatic poly_t xpow(int e, poly_t f_low, int n);
    poly_t x, acc;
    acc = '0;
    acc[0] = 1'b1;
    x = '0;
    x[1] = 1'b1;
    if (n == 1) x = trunc(f_low, n);
    for (int i = 0; i < e; i++) acc = mulmod(acc, x, f_low, n);
    return acc;
  endfunction

  // Random polynomial of degree below n.
  function automatic poly_t rand_poly(int n);
    poly_t p;
    for (int i = 0; i < W; i += 32) p[i +: 32] = $urandom;
    return trunc(p, n);
  endfunction

endpackage
