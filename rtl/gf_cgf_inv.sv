// gf_cgf_inv: inverter over the composite field GF((2^4)^2).
//
// For x = h*Y + l the conjugate is h*Y + (h+l), and x times its conjugate is the
// ground-field norm  nrm = lambda*h^2 + l*(h+l).  The inverse is therefore
//   x^-1 = (h * nrm^-1) * Y + (h+l) * nrm^-1.
// The datapath is one adder (h+l), one GF(2^4) multiplier, a squarer followed by
// the constant multiplication by lambda, an adder, the ground-field inversion and
// two GF(2^4) multipliers. The ground-field inversion is a 16-entry look-up
// table, as the design prescribes for a field this small. The inverse of 0 is
// returned as 0. Purely combinational.
module gf_cgf_inv
  import gf_pkg::*;
(
  input  sym_t x,
  output sym_t y
);

  gf16_t h, l, hl, h_sq, nrm, nrm_inv;

  // inverse in GF(2^4) with x^4 + x + 1; entry 0 maps to 0
  function automatic gf16_t gf16_inv_lut(gf16_t v);
    unique case (v)
      4'h0: return 4'h0;
      4'h1: return 4'h1;
      4'h2: return 4'h9;
      4'h3: return 4'he;
      4'h4: return 4'hd;
      4'h5: return 4'hb;
      4'h6: return 4'h7;
      4'h7: return 4'h6;
      4'h8: return 4'hf;
      4'h9: return 4'h2;
      4'ha: return 4'hc;
      4'hb: return 4'h5;
      4'hc: return 4'ha;
      4'hd: return 4'h4;
      4'he: return 4'h3;
      4'hf: return 4'h8;
    endcase
  endfunction

  always_comb begin
    h       = x[7:4];
    l       = x[3:0];
    hl      = h ^ l;
    h_sq    = gf16_mul(h, h);
    nrm     = gf16_mul(CGF_LAMBDA, h_sq) ^ gf16_mul(l, hl);
    nrm_inv = gf16_inv_lut(nrm);
    y       = {gf16_mul(h, nrm_inv), gf16_mul(hl, nrm_inv)};
  end

endmodule
