// rs_pkg: shared types, constants and GF(2^8) arithmetic of the RS(23,17) decoder.
//
// The code is the MB-OFDM header code: RS(23,17), shortened from RS(255,249),
// t = 3, generator roots alpha^1 .. alpha^6. The field is GF(2^8) built on the
// primitive polynomial x^8 + x^4 + x^3 + x^2 + 1 (0x11D); this is the polynomial
// that reproduces the generator coefficients 126, 4, 158, 58, 49, 117 of
// g(x) = prod_{i=1..6}(x - alpha^i).
//
// gf_mul is a bit-parallel multiplier (shift-and-add with reduction). The
// constant functions gf_pow and gf_inv_table are used at elaboration time to
// build constant multipliers and the inverse ROM.
package rs_pkg;

  localparam int unsigned SYM_W    = 8;          // symbol width m
  localparam int unsigned N_CODE   = 23;         // shortened code length
  localparam int unsigned K_CODE   = 17;         // message symbols
  localparam int unsigned T_CORR   = 3;          // correctable symbol errors
  localparam int unsigned TWO_T    = 2 * T_CORR; // number of syndromes
  localparam int unsigned POLY_LEN = TWO_T + 1;  // coefficients of R, Q, L, U
  localparam logic [8:0]  PRIM_POLY = 9'h11D;

  typedef logic [SYM_W-1:0] sym_t;
  typedef logic [POLY_LEN-1:0][SYM_W-1:0] poly_t; // index = power of x
  typedef logic signed [3:0] deg_t;               // nominal degree, may reach -1

  // State of the modified Euclidean recursion that travels through the
  // systolic array: R, Q, L, U with the nominal degrees of R and Q.
  typedef struct packed {
    poly_t r;
    poly_t q;
    poly_t l;
    poly_t u;
    deg_t  dr;
    deg_t  dq;
  } me_state_t;

  // Coefficient of x^d in p, zero when d is out of range.
  function automatic sym_t coef_at(poly_t p, deg_t d);
    if (d < 0 || d > deg_t'(POLY_LEN - 1)) return '0;
    return p[d[2:0]];
  endfunction

  // Product of two field elements.
  function automatic sym_t gf_mul(sym_t a, sym_t b);
    logic [7:0] acc;
    logic [7:0] aa;
    acc = '0;
    aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= aa;
      aa = aa[7] ? ((aa << 1) ^ PRIM_POLY[7:0]) : (aa << 1);
    end
    return acc;
  endfunction

  // alpha^e, e taken modulo 255.
  function automatic sym_t gf_pow(int e);
    sym_t x;
    int   k;
    sym_t b;
    k = e % 255;
    if (k < 0) k += 255;
    // square and multiply
    x = 8'h01;
    b = 8'h02;
    for (int i = 0; i < 8; i++) begin
      if (k[i]) x = gf_mul(x, b);
      b = gf_mul(b, b);
    end
    return x;
  endfunction

  // Table of multiplicative inverses; entry 0 holds 0.
  typedef sym_t inv_table_t [256];
  function automatic inv_table_t gf_inv_table();
    inv_table_t tab;
    sym_t       x;
    sym_t       y;
    sym_t       alpha_inv;
    alpha_inv = gf_pow(254);
    tab[0] = '0;
    x = 8'h01;
    y = 8'h01;
    for (int i = 0; i < 255; i++) begin
      // x = alpha^i and y = alpha^(-i)
      tab[x] = y;
      x = gf_mul(x, 8'h02);
      y = gf_mul(y, alpha_inv);
    end
    return tab;
  endfunction

endpackage
