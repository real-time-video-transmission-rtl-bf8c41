// rs_forney: Forney error value for one RS(15,9) position.
//
// With the code's first root alpha^1, the error value at locator X is
//   e = omega(X^-1) / sigma'(X^-1) = (X^-1 omega(X^-1)) / sigma_odd(X^-1),
// since in characteristic 2 the derivative keeps only the odd terms of sigma.
// The Chien stage supplies both evaluations; this block inverts the
// denominator (as a^14) and multiplies. The value is gated to zero where the
// position is not an error location, so it can be XORed onto every symbol.
// Purely combinational.
module rs_forney
  import gf16_pkg::*;
(
  input  logic is_root,
  input  gf_t  odd_val,
  input  gf_t  omg_val,
  output gf_t  err_val
);
  assign err_val = is_root ? gf_mul(omg_val, gf_inv(odd_val)) : '0;
endmodule
