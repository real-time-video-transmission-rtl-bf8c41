// gf16_pkg: arithmetic in GF(2^4) and the constants of the RS(15,9) code.
//
// The field is built on the primitive polynomial p(x) = x^4 + x + 1, and the
// code's generator polynomial is
//   g(x) = x^6 + 7x^5 + 9x^4 + 3x^3 + 12x^2 + 10x + 12,
// whose roots are alpha^1 .. alpha^6 (alpha = 2). Both come from the design
// description. Multiplication is a shift-and-add product reduced by p(x); the
// inverse is a^14, since a^15 = 1 for every non-zero element. Everything here is
// combinational and synthesizable; constant operands fold to XOR networks.
package gf16_pkg;

  localparam int unsigned GF_M  = 4;
  localparam int unsigned RS_N  = 15;
  localparam int unsigned RS_K  = 9;
  localparam int unsigned RS_2T = RS_N - RS_K;  // 6 parity symbols

  typedef logic [GF_M-1:0] gf_t;

  // g(x) coefficients g0..g5 (the x^6 coefficient is 1).
  localparam gf_t GEN_POLY [RS_2T] = '{4'd12, 4'd10, 4'd12, 4'd3, 4'd9, 4'd7};

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    // reduce bits 6..4 with x^4 = x + 1
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  // alpha^e for e = 0..
  function automatic gf_t gf_pow_alpha(int unsigned e);
    gf_t r;
    r = 4'd1;
    for (int unsigned i = 0; i < (e % 15); i++) r = gf_mul(r, 4'd2);
    return r;
  endfunction

  // Multiplicative inverse (0 maps to 0).
  function automatic gf_t gf_inv(gf_t a);
    gf_t a2, a4, a8;
    a2 = gf_mul(a, a);
    a4 = gf_mul(a2, a2);
    a8 = gf_mul(a4, a4);
    // a^14 = a^8 * a^4 * a^2
    return gf_mul(a8, gf_mul(a4, a2));
  endfunction

endpackage
