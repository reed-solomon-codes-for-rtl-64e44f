// rs_chien: Chien search over the code positions, in received order.
//
// Position p (p = 0 for the first received symbol) is the coefficient of
// x^(N-1-p), so its error locator is X = ALPHA^(N-1-p). One register per
// coefficient holds Lambda_i * X^-i; at load it receives Lambda_i *
// ALPHA^(-i(N-1)) (the shortened code starts deep inside the field) and on every
// symbol strobe it is multiplied by ALPHA^i, moving to the next position. The
// Omega registers do the same with one extra power (Omega_i * X^-(i+1)), which is
// the numerator Forney needs. The sums are combinational:
//   err_loc = Lambda(X^-1) == 0,  lam_odd = sum of odd terms = X^-1 Lambda'(X^-1),
//   omega_x = X^-1 Omega(X^-1).
// With en low the registers hold their value and err_loc stays low: this is how
// the unit is switched off for error-free blocks and once every error location
// has been found. load has priority over stepping.
// The search itself, its evaluation of the magnitude polynomial and the
// switch-off follow the decoder this design is based on; the pre-scaling for the
// shortened code and the extra power on Omega are this implementation's choice.
module rs_chien
  import gf_pkg::*;
#(
  parameter int unsigned NN = N,
  parameter int unsigned TT = T
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,
  input  logic load,
  input  logic en,
  input  sym_t lambda [TT+1],
  input  sym_t omega [TT],
  output logic err_loc,
  output sym_t lam_odd,
  output sym_t omega_x
);

  sym_t lr [TT+1];
  sym_t orr [TT];
  sym_t lam_val;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(TT); i++) lr[i] <= '0;
      for (int i = 0; i < int'(TT); i++) orr[i] <= '0;
    end else if (sym_en) begin
      if (load) begin
        for (int i = 0; i <= int'(TT); i++)
          lr[i] <= gf_mul(lambda[i], gf_alpha_pow(-i * int'(NN - 1)));
        for (int i = 0; i < int'(TT); i++)
          orr[i] <= gf_mul(omega[i], gf_alpha_pow(-(i + 1) * int'(NN - 1)));
      end else if (en) begin
        for (int i = 0; i <= int'(TT); i++) lr[i] <= gf_mul(lr[i], gf_alpha_pow(i));
        for (int i = 0; i < int'(TT); i++) orr[i] <= gf_mul(orr[i], gf_alpha_pow(i + 1));
      end
    end
  end

  always_comb begin
    lam_val = '0;
    lam_odd = '0;
    omega_x = '0;
    for (int i = 0; i <= int'(TT); i++) begin
      lam_val ^= lr[i];
      if (i % 2 == 1) lam_odd ^= lr[i];
    end
    for (int i = 0; i < int'(TT); i++) omega_x ^= orr[i];
    err_loc = en && (lam_val == '0);
  end

endmodule
