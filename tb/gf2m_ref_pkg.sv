// gf2m_ref_pkg: reference arithmetic in GF(2)[x] for the testbenches.
//
// Works on vectors of up to RW bits with the field size m passed at run time.
// The Montgomery product is computed the long way, independently of the
// array's recurrences: a full polynomial product A*B (degree up to 2m-2),
// reduced modulo G by cancelling the leading term, then (m-1)/2 divisions
// by x, each adding G when the value is odd (G has g_0 = 1) and shifting
// right.
package gf2m_ref_pkg;

  localparam int RW = 1200;
  typedef logic [RW-1:0] poly_t;

  // G with its leading coefficient: g has bits g_(m-1)..g_0.
  function automatic poly_t full_g(input poly_t g, input int m);
    poly_t f;
    f = g;
    f[m] = 1'b1;
    return f;
  endfunction

  // A * B mod G.
  function automatic poly_t mulmod(input poly_t a, input poly_t b, input poly_t g, input int m);
    poly_t prod, gf;
    prod = '0;
    gf   = full_g(g, m);
    for (int i = 0; i < m; i++)
      if (b[i]) prod ^= a << i;
    for (int i = 2 * m - 2; i >= m; i--)
      if (prod[i]) prod ^= gf << (i - m);
    return prod;
  endfunction

  // V * x^-1 mod G.
  function automatic poly_t mul_xinv(input poly_t v, input poly_t g, input int m);
    poly_t r;
    r = v;
    if (r[0]) r ^= full_g(g, m);
    return r >> 1;
  endfunction

  // V * x^-n mod G.
  function automatic poly_t mul_xinv_n(input poly_t v, input poly_t g, input int m, input int n);
    poly_t r;
    r = v;
    for (int i = 0; i < n; i++) r = mul_xinv(r, g, m);
    return r;
  endfunction

  // Montgomery product A B x^-(m-1)/2 mod G.
  function automatic poly_t mont(input poly_t a, input poly_t b, input poly_t g, input int m);
    return mul_xinv_n(mulmod(a, b, g, m), g, m, (m - 1) / 2);
  endfunction

  // Bit-order reversal of the low m bits.
  function automatic poly_t rev(input poly_t v, input int m);
    poly_t r;
    r = '0;
    for (int k = 0; k < m; k++) r[k] = v[m-1-k];
    return r;
  endfunction

  // Random polynomial of degree < m.
  function automatic poly_t rand_poly(input int m);
    poly_t r;
    r = '0;
    for (int k = 0; k < m; k++) r[k] = 1'($urandom);
    return r;
  endfunction

  // Low m coefficients of a field polynomial: a NIST/standard one where
  // known, otherwise a random one with g_0 = 1 (the Montgomery identity
  // needs only that x is invertible modulo G).
  function automatic poly_t field_g(input int m, input bit random_g);
    poly_t g;
    g = '0;
    if (random_g) begin
      g = rand_poly(m);
    end else begin
      case (m)
        5:   g[2] = 1'b1;                                   // x^5+x^2+1
        7:   g[1] = 1'b1;                                   // x^7+x+1
        163: begin g[7] = 1'b1; g[6] = 1'b1; g[3] = 1'b1; end
        233: g[74] = 1'b1;
        283: begin g[12] = 1'b1; g[7] = 1'b1; g[5] = 1'b1; end
        409: g[87] = 1'b1;
        571: begin g[10] = 1'b1; g[5] = 1'b1; g[2] = 1'b1; end
        default: g = rand_poly(m);
      endcase
    end
    g[0] = 1'b1;
    return g;
  endfunction

endpackage
