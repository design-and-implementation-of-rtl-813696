// rs_ref_pkg -- reference arithmetic for the RS(255,223) testbenches.
//
// Written independently of the RTL: products are formed as a 15-bit
// carry-less product reduced by long division with 0x11D, the generator
// polynomial is multiplied out from its roots alpha^1..alpha^32 at run time,
// parity is the remainder of a polynomial long division, and syndromes are
// a direct sum r_j * alpha^(i*j). Codewords are stored in transmission order:
// cw[0] is the coefficient of x^254, cw[254] that of x^0.
package rs_ref_pkg;

  typedef byte unsigned sym_t;
  typedef sym_t cw_t   [255];
  typedef sym_t gen_t  [33];
  typedef sym_t syn_t  [32];

  function automatic sym_t ref_mul(sym_t a, sym_t b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11D) << (i - 8);
    return sym_t'(p[7:0]);
  endfunction

  function automatic sym_t ref_pow(sym_t a, int e);
    sym_t r = 1;
    for (int i = 0; i < e; i++) r = ref_mul(r, a);
    return r;
  endfunction

  // g(x) = prod_{i=1..32} (x + alpha^i); g[k] is the coefficient of x^k.
  function automatic gen_t ref_gen();
    gen_t g;
    for (int k = 0; k < 33; k++) g[k] = 0;
    g[0] = 1;
    for (int i = 1; i <= 32; i++) begin
      sym_t root = ref_pow(2, i);
      gen_t n;
      for (int k = 0; k < 33; k++) n[k] = 0;
      for (int k = 0; k < 32; k++) begin
        n[k+1] ^= g[k];
        n[k]   ^= ref_mul(g[k], root);
      end
      g = n;
    end
    return g;
  endfunction

  // Systematic codeword: message bytes then the remainder of x^32 m(x) / g(x).
  function automatic cw_t ref_encode(sym_t msg [223]);
    gen_t g = ref_gen();
    sym_t rem [255];
    cw_t cw;
    for (int j = 0; j < 255; j++) rem[j] = (j < 223) ? msg[j] : 0;
    for (int j = 0; j < 223; j++) begin
      sym_t q = rem[j];
      if (q != 0)
        for (int k = 0; k <= 32; k++) rem[j+k] ^= ref_mul(q, g[32-k]);
    end
    for (int j = 0; j < 255; j++) cw[j] = (j < 223) ? msg[j] : rem[j];
    return cw;
  endfunction

  // S_i = sum_j r_j alpha^(i*j), r_j the coefficient of x^j.
  function automatic syn_t ref_syndromes(cw_t r);
    syn_t s;
    for (int i = 1; i <= 32; i++) begin
      sym_t acc = 0;
      sym_t ai = ref_pow(2, i);
      sym_t xp = 1;                         // (alpha^i)^j
      for (int j = 0; j < 255; j++) begin
        acc ^= ref_mul(r[254-j], xp);
        xp = ref_mul(xp, ai);
      end
      s[i-1] = acc;
    end
    return s;
  endfunction

endpackage
