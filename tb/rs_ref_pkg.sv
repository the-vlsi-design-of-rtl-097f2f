// rs_ref_pkg: reference arithmetic for the encoder testbenches.
//
// Plain software models, written independently of the RTL: GF(2^m) arithmetic in
// the polynomial basis (field polynomial given as an integer, e.g. 'h187 for
// x^8+x^7+x^2+x+1), the trace, conversion to and from the dual basis
// (bit k of the dual form of x is Tr(x alpha^k)), the generator polynomial
// prod_{j=b}^{b+nchk-1} (x - alpha^(ge*j)), a long-division encoder and a
// codeword evaluator used for syndrome checks.
package rs_ref_pkg;

  function automatic int unsigned gf_mul(int unsigned a, int unsigned b,
                                         int unsigned m, int unsigned poly);
    int unsigned r = 0;
    for (int i = 0; i < int'(m); i++) begin
      if (b[i]) r ^= a;
      a = a << 1;
      if (a[m]) a ^= poly;
    end
    return r;
  endfunction

  function automatic int unsigned gf_pow(int unsigned e, int unsigned m, int unsigned poly);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e % ((1 << m) - 1); i++) r = gf_mul(r, 2, m, poly);
    return r;
  endfunction

  function automatic bit gf_tr(int unsigned x, int unsigned m, int unsigned poly);
    int unsigned s = 0, y = x;
    for (int i = 0; i < int'(m); i++) begin
      s ^= y;
      y = gf_mul(y, y, m, poly);
    end
    return s[0];
  endfunction

  // Dual-basis bits of x: bit k = Tr(x alpha^k).
  function automatic int unsigned to_dual(int unsigned x, int unsigned m, int unsigned poly);
    int unsigned d = 0, y = x;
    for (int k = 0; k < int'(m); k++) begin
      d[k] = gf_tr(y, m, poly);
      y = gf_mul(y, 2, m, poly);
    end
    return d;
  endfunction

  function automatic int unsigned from_dual(int unsigned d, int unsigned m, int unsigned poly);
    for (int unsigned x = 0; x < (1 << m); x++)
      if (to_dual(x, m, poly) == d) return x;
    return 0;
  endfunction

  typedef int unsigned coef_t [0:64];

  // Coefficients g_0..g_nchk of prod_{j=b}^{b+nchk-1} (x + alpha^(ge*j)).
  function automatic coef_t gen_poly(int unsigned m, int unsigned poly, int unsigned ge,
                                     int unsigned b, int unsigned nchk);
    coef_t g;
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int unsigned j = b; j < b + nchk; j++) begin
      int unsigned root = gf_pow(ge * j, m, poly);
      for (int i = int'(nchk); i >= 1; i--) g[i] = g[i-1] ^ gf_mul(g[i], root, m, poly);
      g[0] = gf_mul(g[0], root, m, poly);
    end
    return g;
  endfunction

  // Evaluate a polynomial given highest coefficient first at x.
  function automatic int unsigned poly_eval(int unsigned c [$], int unsigned x,
                                            int unsigned m, int unsigned poly);
    int unsigned acc = 0;
    foreach (c[i]) acc = gf_mul(acc, x, m, poly) ^ c[i];
    return acc;
  endfunction

  // Check symbols of info (highest degree first): remainder of info(x) x^nchk
  // divided by g, returned highest degree first (transmission order).
  function automatic void ref_encode(int unsigned info [$], coef_t g, int unsigned nchk,
                                     int unsigned m, int unsigned poly,
                                     ref int unsigned chk [$]);
    int unsigned rem [$];
    int unsigned f;
    rem = {};
    repeat (nchk) rem.push_back(0);     // rem[i] = coefficient of x^i
    foreach (info[s]) begin
      f = info[s] ^ rem[nchk-1];
      for (int i = int'(nchk) - 1; i >= 1; i--) rem[i] = rem[i-1] ^ gf_mul(f, g[i], m, poly);
      rem[0] = gf_mul(f, g[0], m, poly);
    end
    chk = {};
    for (int i = int'(nchk) - 1; i >= 0; i--) chk.push_back(rem[i]);
  endfunction

endpackage
