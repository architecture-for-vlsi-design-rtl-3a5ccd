// tb_rs_ref_pkg: reference Reed-Solomon arithmetic for the testbenches.
//
// Written independently of the RTL: field elements come from an exponent
// table built by repeated multiplication by alpha, products use the
// log/antilog method, parity is the remainder of a polynomial long division,
// and syndromes evaluate a code word at the generator roots by Horner's rule.
package tb_rs_ref_pkg;

  typedef int unsigned uint_t;

  class rs_ref;
    int unsigned poly;      // field polynomial including x^8
    int unsigned root_exp;  // beta = alpha^root_exp
    int unsigned first;     // first root exponent
    int unsigned two_e;     // number of parity symbols
    int unsigned expt[512];
    int unsigned logt[256];
    int unsigned g[65];     // generator coefficients, g[j] of x^j

    function new(int unsigned poly_i, int unsigned root_exp_i,
                 int unsigned first_i, int unsigned two_e_i);
      int unsigned x = 1;
      poly = poly_i; root_exp = root_exp_i; first = first_i; two_e = two_e_i;
      for (int i = 0; i < 512; i++) begin
        expt[i] = x;
        if (i < 255) logt[x] = i;
        x = x << 1;
        if (x & 'h100) x = x ^ poly;
      end
      build_gen();
    endfunction

    function int unsigned mul(int unsigned a, int unsigned b);
      if (a == 0 || b == 0) return 0;
      return expt[logt[a] + logt[b]];
    endfunction

    function int unsigned beta_pow(int unsigned i);
      return expt[(i * root_exp) % 255];
    endfunction

    function void build_gen();
      for (int j = 0; j < 65; j++) g[j] = 0;
      g[0] = 1;
      for (int unsigned i = first; i < first + two_e; i++) begin
        int unsigned r = beta_pow(i);
        for (int j = int'(two_e); j >= 1; j--) g[j] = g[j-1] ^ mul(g[j], r);
        g[0] = mul(g[0], r);
      end
    endfunction

    // msg[0] is sent first (highest power). par[d] is the coefficient of x^d.
    function void encode(input int unsigned msg[], output int unsigned par[64]);
      int unsigned rem[];
      int n = msg.size() + int'(two_e);
      rem = new[n];
      for (int i = 0; i < n; i++) rem[i] = (i < msg.size()) ? msg[i] : 0;
      // rem[i] is the coefficient of x^(n-1-i); divide by monic g
      for (int i = 0; i < msg.size(); i++) begin
        int unsigned q = rem[i];
        if (q != 0)
          for (int j = 0; j <= int'(two_e); j++)
            rem[i + j] ^= mul(q, g[two_e - j]);
      end
      for (int d = 0; d < 64; d++) par[d] = 0;
      for (int d = 0; d < int'(two_e); d++) par[d] = rem[n - 1 - d];
    endfunction

    // cw[0] is the highest-degree symbol. Returns the number of nonzero syndromes.
    function int syndromes_nonzero(input int unsigned cw[]);
      int bad = 0;
      for (int unsigned i = first; i < first + two_e; i++) begin
        int unsigned r = beta_pow(i);
        int unsigned s = 0;
        foreach (cw[k]) s = mul(s, r) ^ cw[k];
        if (s != 0) bad++;
      end
      return bad;
    endfunction
  endclass

endpackage
