// rs_forney: Forney's algorithm, error magnitude of one located symbol.
//
// With the numerator num = X^-1 Omega(X^-1) and the denominator
// den = X^-1 Lambda'(X^-1) (the odd part of Lambda), both supplied by the Chien
// search, the magnitude is e = num / den. The division is a multiplication by
// the inverse obtained from the shared inverter: the unit raises inv_req with
// the denominator only when req is high, that is when an error has been located
// on a data symbol, so the inverter stays quiet otherwise. Errors on parity
// symbols are not requested: they need no correction. mag is 0 when req is low.
// Combinational: the magnitude is valid in the cycle of the request.
module rs_forney
  import gf_pkg::*;
(
  input  logic req,
  input  sym_t num,
  input  sym_t den,
  output logic inv_req,
  output sym_t inv_x,
  input  sym_t inv_y,
  output sym_t mag
);

  sym_t prod;

  assign inv_req = req;
  assign inv_x   = req ? den : sym_t'(0);

  gf_cgf_mul u_mul (.a(req ? num : sym_t'(0)), .b(inv_y), .p(prod));

  assign mag = req ? prod : sym_t'(0);

endmodule
