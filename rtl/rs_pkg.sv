// rs_pkg: shared constants and Galois-field helpers for the bit-serial,
// symbol-slice Reed-Solomon encoder.
//
// The default code is the (255,223) code over GF(2^8): J = 8 bits per symbol,
// E = 16 correctable symbols, interleaving depth I = 5, built from four
// identical encoder chips. The field is generated by x^8+x^4+x^3+x^2+1 and the
// code generator polynomial is g(x) = prod_{i=112}^{143} (x - beta^i) with
// beta = alpha^ROOT_EXP (ROOT_EXP = 1 for the main design, 11 for the
// alternative telemetry-standard parameter set that also changes the field
// polynomial to x^8+x^7+x^2+x+1). Because the root range is symmetric about
// 2^(J-1) - 1/2, g(x) has symmetric coefficients (g_j = g_{2E-j}, g_0 = g_2E = 1)
// and only g_1 .. g_E need multipliers.
//
// gen_coefs() evaluates g(x) at elaboration time, so the coefficient table
// is computed from the field and root parameters instead of being typed in.
package rs_pkg;

  localparam int unsigned MAX_2E = 64;          // largest 2E the helpers support

  typedef logic [7:0] gcoef_t;
  typedef gcoef_t gpoly_t [0:MAX_2E];           // g_0 .. g_2E (unused tail = 0)

  // Polynomial-basis product of two J-bit elements modulo the field polynomial
  // 'poly' (which includes the x^J term).
  function automatic int unsigned gf_mul(int unsigned a, int unsigned b,
                                         int unsigned poly, int unsigned j);
    int unsigned p = 0;
    int unsigned x = a;
    for (int unsigned k = 0; k < j; k++) begin
      if (b[k]) p ^= x;
      x = x << 1;
      if (x[j]) x ^= poly;
    end
    return p;
  endfunction

  // alpha^e, alpha being the root of the field polynomial (the element "2").
  function automatic int unsigned gf_pow_alpha(int unsigned e, int unsigned poly,
                                               int unsigned j);
    int unsigned r = 1;
    for (int unsigned k = 0; k < e; k++) r = gf_mul(r, 2, poly, j);
    return r;
  endfunction

  // Coefficients of g(x) = prod_{i=first}^{first+2e-1} (x - beta^i),
  // beta = alpha^root_exp. Index j holds the coefficient of x^j.
  function automatic gpoly_t gen_coefs(int unsigned e, int unsigned first,
                                       int unsigned root_exp, int unsigned poly,
                                       int unsigned j);
    gpoly_t g;
    int unsigned order = (1 << j) - 1;
    for (int unsigned k = 0; k <= MAX_2E; k++) g[k] = '0;
    g[0] = 8'd1;
    for (int unsigned i = first; i < first + 2 * e; i++) begin
      int unsigned r = gf_pow_alpha((i * root_exp) % order, poly, j);
      // multiply the running product by (x + r)
      for (int k = int'(2 * e); k >= 1; k--)
        g[k] = gcoef_t'(g[k-1] ^ gcoef_t'(gf_mul(32'(g[k]), r, poly, j)));
      g[0] = gcoef_t'(gf_mul(32'(g[0]), r, poly, j));
    end
    return g;
  endfunction

endpackage
