// Shared definitions for the split GF(2^n) multiplier.
//
// The multiplier splits operand a into a high part of K = ceil(n/2)
// coefficients, consumed most-significant first by the classical
// (shift-left) accumulator, and a low part of M = floor(n/2) coefficients,
// consumed least-significant first by the Montgomery (shift-right)
// accumulator. The product comes out scaled by x^-M. The split and the
// ceil(n/2) cycle count follow the published split-multiplier method; the names are this RTL's.
package gf2n_pkg;

  // Coefficients handled by the Montgomery half (a_0 .. a_{M-1}).
  function automatic int unsigned mont_bits(int unsigned n);
    return n / 2;
  endfunction

  // Coefficients handled by the classical half (a_M .. a_{n-1});
  // this is also the number of iteration cycles.
  function automatic int unsigned clas_bits(int unsigned n);
    return n - n / 2;
  endfunction

  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } mult_state_e;

endpackage
