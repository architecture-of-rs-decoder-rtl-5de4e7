// tb_ref_pkg: reference arithmetic for the RS(23,17) testbenches.
//
// Everything here is computed independently of the design: field products are
// formed as a 15-bit carry-less product reduced by long division by
// x^8 + x^4 + x^3 + x^2 + 1, the generator polynomial is built from its roots
// alpha^1..alpha^6, codewords are encoded systematically by polynomial
// division and syndromes are evaluated term by term.
// Codeword arrays are indexed by the power of x: cw[22] is sent first.
package tb_ref_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t word_t [23];
  typedef byte_t msg_t  [17];

  function automatic byte_t rmul(byte_t a, byte_t b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11D) << (i - 8);
    return p[7:0];
  endfunction

  function automatic byte_t rpow(int e);
    byte_t x;
    int    k;
    k = e % 255;
    if (k < 0) k += 255;
    x = 8'h01;
    repeat (k) x = rmul(x, 8'h02);
    return x;
  endfunction

  function automatic byte_t rinv(byte_t a);
    // a^254 = a^-1
    byte_t x;
    x = 8'h01;
    repeat (254) x = rmul(x, a);
    return (a == 0) ? 8'h00 : x;
  endfunction

  // g(x) coefficients, g[k] of x^k
  typedef byte_t gen_t [7];
  function automatic gen_t gen_poly();
    gen_t g;
    for (int k = 0; k < 7; k++) g[k] = 0;
    g[0] = 8'h01;
    for (int i = 1; i <= 6; i++) begin
      gen_t ng;
      for (int k = 0; k < 7; k++) ng[k] = 0;
      for (int k = 0; k < 6; k++) begin
        ng[k]   ^= rmul(g[k], rpow(i));
        ng[k+1] ^= g[k];
      end
      g = ng;
    end
    return g;
  endfunction

  // error pattern c*(x - a^2)(x - a^3)...(x - a^6): its syndromes S2..S6 are
  // zero and S1 is not, a six-error pattern the solver cannot finish
  function automatic word_t only_s1_pattern(byte_t c);
    word_t e;
    for (int p = 0; p < 23; p++) e[p] = 0;
    e[0] = c;
    for (int i = 2; i <= 6; i++) begin
      word_t ne;
      for (int p = 0; p < 23; p++) ne[p] = 0;
      for (int p = 0; p < 22; p++) begin
        ne[p]   ^= rmul(e[p], rpow(i));
        ne[p+1] ^= e[p];
      end
      e = ne;
    end
    return e;
  endfunction

  // m[0] is the first message symbol (coefficient of x^22)
  function automatic word_t encode(msg_t m);
    word_t cw;
    word_t rem;
    gen_t  g;
    g = gen_poly();
    for (int p = 0; p < 23; p++) rem[p] = 0;
    for (int i = 0; i < 17; i++) rem[22 - i] = m[i];
    cw = rem;
    for (int i = 22; i >= 6; i--) begin
      byte_t c;
      c = rem[i];
      if (c != 0) for (int k = 0; k < 7; k++) rem[i - 6 + k] ^= rmul(c, g[k]);
    end
    for (int p = 0; p < 6; p++) cw[p] = rem[p];
    return cw;
  endfunction

  typedef byte_t synd_t [6];
  function automatic synd_t syndromes(word_t r);
    synd_t s;
    for (int j = 1; j <= 6; j++) begin
      s[j-1] = 0;
      for (int p = 0; p < 23; p++) s[j-1] ^= rmul(r[p], rpow(j * p));
    end
    return s;
  endfunction

  // evaluate a polynomial with up to 7 coefficients at x
  typedef byte_t poly7_t [7];
  function automatic byte_t peval(poly7_t c, int n, byte_t x);
    byte_t acc, xp;
    acc = 0;
    xp  = 8'h01;
    for (int k = 0; k < n; k++) begin
      acc ^= rmul(c[k], xp);
      xp = rmul(xp, x);
    end
    return acc;
  endfunction

  function automatic msg_t random_msg();
    msg_t m;
    foreach (m[i]) m[i] = byte_t'($urandom);
    return m;
  endfunction

  // add nerr errors at distinct random positions; returns the corrupted word
  function automatic word_t corrupt(word_t cw, int nerr);
    word_t r;
    logic [22:0] used;
    r = cw;
    used = '0;
    for (int e = 0; e < nerr; e++) begin
      int p;
      do p = $urandom_range(0, 22); while (used[p]);
      used[p] = 1'b1;
      r[p] ^= byte_t'($urandom_range(1, 255));
    end
    return r;
  endfunction

endpackage
