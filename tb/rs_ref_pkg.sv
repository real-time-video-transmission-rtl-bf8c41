// rs_ref_pkg: reference model of the RS(15,9) code for the testbenches.
//
// Works from log/antilog tables of GF(16) (p(x) = x^4 + x + 1) built at run
// time, independently of the RTL's shift-and-add multiplier: encoding by
// polynomial long division by g(x), syndromes by direct evaluation
// sum r_i alpha^(i*j), and polynomial evaluation for locators.
package rs_ref_pkg;
  int unsigned exp_t [30];
  int unsigned log_t [16];
  bit          ready = 0;

  function automatic void init();
    int unsigned x;
    x = 1;
    for (int i = 0; i < 15; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = x << 1;
      if (x & 16) x = x ^ 19;
    end
    for (int i = 15; i < 30; i++) exp_t[i] = exp_t[i-15];
    ready = 1;
  endfunction

  function automatic int unsigned mul(int unsigned a, int unsigned b);
    if (!ready) init();
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int unsigned inv(int unsigned a);
    if (!ready) init();
    return exp_t[(15 - log_t[a]) % 15];
  endfunction

  function automatic int unsigned apow(int e);
    if (!ready) init();
    return exp_t[((e % 15) + 15) % 15];
  endfunction

  // g(x) = x^6 + 7x^5 + 9x^4 + 3x^3 + 12x^2 + 10x + 12, index = degree
  function automatic int unsigned gcoef(int d);
    int unsigned g [7] = '{12, 10, 12, 3, 9, 7, 1};
    return g[d];
  endfunction

  // msg[0] is the highest-degree message symbol; cw[0] is the x^14 coefficient.
  function automatic void encode(input int unsigned msg [9], output int unsigned cw [15]);
    int unsigned rem [15];
    for (int i = 0; i < 15; i++) rem[i] = (i < 9) ? msg[i] : 0;
    for (int i = 0; i < 9; i++) begin
      int unsigned q;
      q = rem[i];
      for (int d = 0; d <= 6; d++) rem[i + 6 - d] ^= mul(q, gcoef(d));
    end
    for (int i = 0; i < 15; i++) cw[i] = (i < 9) ? msg[i] : rem[i];
  endfunction

  // S_j = R(alpha^j), j = 1..6; cw[k] is the coefficient of x^(14-k)
  function automatic int unsigned syndrome(input int unsigned cw [15], int j);
    int unsigned s;
    s = 0;
    for (int k = 0; k < 15; k++) s ^= mul(cw[k], apow(j * (14 - k)));
    return s;
  endfunction
endpackage
