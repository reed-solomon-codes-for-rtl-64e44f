// gf_pkg: constants and arithmetic shared by the RS(40,32,4) encoder and decoder.
//
// Code symbols are elements of GF(2^8), held directly in the composite form
// GF((2^4)^2): a byte {h,l} stands for h*Y + l, with h and l in the ground field
// GF(2^4) (polynomial x^4+x+1) and Y a root of Y^2 + Y + CGF_LAMBDA. The code is
// the shortened RS(N=40, K=32, T=4) code whose generator has the roots
// ALPHA^1 .. ALPHA^2T. The code sizes are the ones the design is built for; the
// polynomials, LAMBDA and ALPHA are this implementation's choice (any
// irreducible extension and any primitive element give an equivalent code).
//
// The functions are combinational. gf_mul is the composite-field multiplier used
// for constant multiplications (multiplication by a fixed power of ALPHA is a
// linear map that synthesis reduces to XORs); the general multiplier and the
// inverter are separate modules (gf_cgf_mul, gf_cgf_inv).
package gf_pkg;

  localparam int unsigned M = 8;    // bits per symbol
  localparam int unsigned N = 40;   // code length (shortened)
  localparam int unsigned K = 32;   // data symbols per block
  localparam int unsigned T = 4;    // correctable symbols
  localparam int unsigned NPAR = 2 * T;

  localparam logic [3:0] GF16_POLY  = 4'h3;   // x^4 + x + 1 (low bits)
  localparam logic [3:0] CGF_LAMBDA = 4'h8;   // Y^2 + Y + lambda
  localparam logic [7:0] ALPHA      = 8'h12;  // primitive element

  typedef logic [M-1:0] sym_t;
  typedef logic [3:0]   gf16_t;

  // GF(2^4) multiplication, shift-and-add modulo x^4 + x + 1
  function automatic gf16_t gf16_mul(gf16_t a, gf16_t b);
    gf16_t acc;
    gf16_t sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[3] ? ({sh[2:0], 1'b0} ^ GF16_POLY) : {sh[2:0], 1'b0};
    end
    return acc;
  endfunction

  // GF((2^4)^2) multiplication, Karatsuba form with three ground products
  function automatic sym_t gf_mul(sym_t a, sym_t b);
    gf16_t m_hh, m_ss, m_ll;
    m_hh = gf16_mul(a[7:4], b[7:4]);
    m_ss = gf16_mul(a[7:4] ^ a[3:0], b[7:4] ^ b[3:0]);
    m_ll = gf16_mul(a[3:0], b[3:0]);
    return {m_ss ^ m_ll, gf16_mul(CGF_LAMBDA, m_hh) ^ m_ll};
  endfunction

  // ALPHA^e for a constant exponent (e taken modulo 255)
  function automatic sym_t gf_alpha_pow(int e);
    sym_t r, sq;
    int   k;
    k = e % 255;
    if (k < 0) k += 255;
    r  = 8'h01;
    sq = ALPHA;
    for (int i = 0; i < 8; i++) begin   // square and multiply
      if (k[i]) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // coefficients g_0..g_2T of the generator g(x) = prod_{i=1..2T} (x + ALPHA^i)
  typedef logic [NPAR:0][M-1:0] gen_poly_t;

  function automatic gen_poly_t gf_gen_poly();
    gen_poly_t g;
    g    = '0;
    g[0] = 8'h01;
    for (int i = 1; i <= int'(NPAR); i++) begin
      for (int j = int'(NPAR); j >= 1; j--)
        g[j] = g[j-1] ^ gf_mul(g[j], gf_alpha_pow(i));
      g[0] = gf_mul(g[0], gf_alpha_pow(i));
    end
    return g;
  endfunction

endpackage
