// rs_ref_pkg: reference arithmetic for the testbenches, written independently of
// the RTL operators. GF(2^4) products are reduced bit by bit from the top,
// composite products use the schoolbook form (four ground products) with
// Y^2 = Y + 8, inverses are found by search, and the RS code is built from
// polynomial long division and direct polynomial evaluation. Also holds a
// small error-pattern helper shared by the decoder testbenches.
package rs_ref_pkg;

  localparam int RN = 40;
  localparam int RK = 32;
  localparam int RT = 4;
  localparam logic [7:0] RALPHA = 8'h12;

  typedef logic [7:0] byte_t;
  typedef byte_t cw_t [RN];

  function automatic logic [3:0] r16_mul(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic byte_t rmul(byte_t a, byte_t b);
    logic [3:0] hh, hl, lh, ll;
    hh = r16_mul(a[7:4], b[7:4]);
    hl = r16_mul(a[7:4], b[3:0]);
    lh = r16_mul(a[3:0], b[7:4]);
    ll = r16_mul(a[3:0], b[3:0]);
    // hh*Y^2 = hh*Y + hh*lambda
    return {hh ^ hl ^ lh, r16_mul(hh, 4'h8) ^ ll};
  endfunction

  function automatic byte_t rpow(int e);
    byte_t r;
    int k;
    k = e % 255;
    if (k < 0) k += 255;
    r = 8'h01;
    for (int i = 0; i < k; i++) r = rmul(r, RALPHA);
    return r;
  endfunction

  function automatic byte_t rinv(byte_t a);
    for (int b = 1; b < 256; b++) if (rmul(a, byte_t'(b)) == 8'h01) return byte_t'(b);
    return 8'h00;
  endfunction

  // systematic codeword: data first, then the remainder of data(x)*x^2T / g(x)
  function automatic cw_t rencode(byte_t d [RK]);
    byte_t g [2*RT+1];
    byte_t rem [RN];
    cw_t   c;
    for (int j = 0; j <= 2 * RT; j++) g[j] = '0;
    g[0] = 8'h01;
    for (int i = 1; i <= 2 * RT; i++) begin
      for (int j = 2 * RT; j >= 1; j--) g[j] = g[j-1] ^ rmul(g[j], rpow(i));
      g[0] = rmul(g[0], rpow(i));
    end
    // rem[p] is the coefficient of x^(RN-1-p)
    for (int p = 0; p < RN; p++) rem[p] = (p < RK) ? d[p] : 8'h00;
    for (int p = 0; p < RK; p++) begin
      byte_t q;
      q = rem[p];
      if (q != 0)
        for (int j = 0; j <= 2 * RT; j++) rem[p + j] ^= rmul(q, g[2 * RT - j]);
    end
    for (int p = 0; p < RN; p++) c[p] = (p < RK) ? d[p] : rem[p];
    return c;
  endfunction

  // S_i = r(ALPHA^i), i = 1..2T, position p weighted by x^(RN-1-p)
  function automatic byte_t rsynd(cw_t r, int i);
    byte_t s;
    s = '0;
    for (int p = 0; p < RN; p++) s ^= rmul(r[p], rpow(i * (RN - 1 - p)));
    return s;
  endfunction

endpackage
