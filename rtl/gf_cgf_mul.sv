// gf_cgf_mul: general multiplier over the composite field GF((2^4)^2).
//
// Each operand is split into its high and low GF(2^4) halves. Three ground-field
// products are formed: high*high, (high+low)*(high+low) and low*low, using two
// input adders. Because Y^2 = Y + lambda, the product is
//   high = m_ss + m_ll   (the cross terms plus Y^2 folded back)
//   low  = lambda*m_hh + m_ll
// which takes two output adders and one multiplication by the constant lambda.
// This is the operator structure of the composite-field multiplier the design is
// based on; the bit-parallel ground-field multiplier inside is this
// implementation's choice. Purely combinational, no latency.
module gf_cgf_mul
  import gf_pkg::*;
(
  input  sym_t a,
  input  sym_t b,
  output sym_t p
);

  gf16_t a_sum, b_sum;
  gf16_t m_hh, m_ss, m_ll;

  always_comb begin
    a_sum = a[7:4] ^ a[3:0];
    b_sum = b[7:4] ^ b[3:0];
    m_hh  = gf16_mul(a[7:4], b[7:4]);
    m_ss  = gf16_mul(a_sum, b_sum);
    m_ll  = gf16_mul(a[3:0], b[3:0]);
    p     = {m_ss ^ m_ll, gf16_mul(CGF_LAMBDA, m_hh) ^ m_ll};
  end

endmodule
