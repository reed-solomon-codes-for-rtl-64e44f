// rs_eea: Key Equation Solving by the Extended Euclidean Algorithm.
//
// From the syndrome polynomial S(x) = S_1 + S_2 x + ... + S_2T x^(2T-1) it finds
// the error locator Lambda(x) and error magnitude polynomial Omega(x) with
// Lambda*S = Omega mod x^2T, deg Omega < T. Registers hold the dividend R0
// (starts as x^2T), the divisor R1 (starts as S), and their cofactors T0 (0) and
// T1 (1). The division is done one quotient term per clock:
//   c  = lead(R0) * lead(R1)^-1,  d = deg R0 - deg R1
//   R0 = R0 + c x^d R1,  T0 = T0 + c x^d T1
// and when deg R0 drops below deg R1 the pairs are swapped. The inverse of the
// leading coefficient is computed once per new divisor on the shared inverter
// (state INV, at most T times per block), so the general multipliers are
// 2T+1 for the remainder, T+1 for the cofactor and one for c. The solver stops
// when deg R1 < T: Lambda = T1, Omega = R1. Neither is normalised; the common
// factor cancels in Forney's ratio and does not move the roots.
//
// Timing: start is a one-cycle pulse; busy is high while solving; done pulses
// once when lambda/omega/deg_lambda are valid. They stay valid until the next
// start. Worst case for T=4: 1 + T inversions + 2T steps = 13 clocks, plus one
// clock for every cycle the inverter is not granted.
// The use of the Euclidean algorithm, the shared inverter and the inversion
// count follow the decoder this design is based on; the one-term-per-clock
// schedule and the handshake are this implementation's choice.
module rs_eea
  import gf_pkg::*;
#(
  parameter int unsigned TT = T
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  sym_t synd [2*TT],
  output logic inv_req,
  output sym_t inv_x,
  input  logic inv_gnt,
  input  sym_t inv_y,
  output logic busy,
  output logic done,
  output sym_t lambda [TT+1],
  output sym_t omega [TT],
  output logic [$clog2(TT+2)-1:0] deg_lambda
);

  localparam int unsigned RL = 2 * TT + 1;   // remainder length
  localparam int unsigned TL = TT + 1;       // cofactor length

  typedef enum logic [1:0] {S_IDLE, S_INV, S_STEP} state_t;
  state_t state;

  sym_t r0 [RL], r1 [RL], t0 [TL], t1 [TL];
  sym_t r0n [RL], t0n [TL];
  sym_t cr1 [RL], ct1 [TL];
  sym_t ilead, c;
  int   dr0, dr1, dr0n, dsh;

  function automatic int deg_r(sym_t p [RL]);
    int d;
    d = -1;
    for (int i = 0; i < RL; i++) if (p[i] != '0) d = i;
    return d;
  endfunction

  function automatic int deg_t(sym_t p [TL]);
    int d;
    d = -1;
    for (int i = 0; i < TL; i++) if (p[i] != '0) d = i;
    return d;
  endfunction

  // quotient coefficient and the scaled divisor / cofactor
  gf_cgf_mul u_c (.a(r0[dr0 < 0 ? 0 : dr0]), .b(ilead), .p(c));
  for (genvar j = 0; j < RL; j++) begin : g_r
    gf_cgf_mul u_m (.a(c), .b(r1[j]), .p(cr1[j]));
  end
  for (genvar j = 0; j < TL; j++) begin : g_t
    gf_cgf_mul u_m (.a(c), .b(t1[j]), .p(ct1[j]));
  end

  always_comb begin
    dr0 = deg_r(r0);
    dr1 = deg_r(r1);
    dsh = dr0 - dr1;
  end

  always_comb begin
    for (int i = 0; i < RL; i++)
      r0n[i] = r0[i] ^ ((i >= dsh) ? cr1[i - dsh] : sym_t'(0));
    for (int i = 0; i < TL; i++)
      t0n[i] = t0[i] ^ ((i >= dsh) ? ct1[i - dsh] : sym_t'(0));
  end

  assign dr0n = deg_r(r0n);

  assign inv_req = (state == S_INV);
  assign inv_x   = inv_req ? r1[dr1 < 0 ? 0 : dr1] : sym_t'(0);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      ilead <= '0;
      for (int i = 0; i < RL; i++) begin
        r0[i] <= '0;
        r1[i] <= '0;
      end
      for (int i = 0; i < TL; i++) begin
        t0[i] <= '0;
        t1[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            for (int i = 0; i < RL; i++) begin
              r0[i] <= (i == 2 * TT) ? sym_t'(1) : sym_t'(0);
              r1[i] <= (i < 2 * TT) ? synd[i] : sym_t'(0);
            end
            for (int i = 0; i < TL; i++) begin
              t0[i] <= '0;
              t1[i] <= (i == 0) ? sym_t'(1) : sym_t'(0);
            end
            // the key equation is already solved when deg S < T
            begin : chk
              int ds;
              ds = -1;
              for (int i = 0; i < 2 * TT; i++) if (synd[i] != '0) ds = i;
              if (ds >= int'(TT)) state <= S_INV;
              else                done  <= 1'b1;
            end
          end
        end
        S_INV: begin
          if (inv_gnt) begin
            ilead <= inv_y;
            state <= S_STEP;
          end
        end
        S_STEP: begin
          if (dr0n < dr1) begin
            for (int i = 0; i < RL; i++) begin
              r0[i] <= r1[i];
              r1[i] <= r0n[i];
            end
            for (int i = 0; i < TL; i++) begin
              t0[i] <= t1[i];
              t1[i] <= t0n[i];
            end
            if (dr0n < int'(TT)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_INV;
            end
          end else begin
            for (int i = 0; i < RL; i++) r0[i] <= r0n[i];
            for (int i = 0; i < TL; i++) t0[i] <= t0n[i];
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < TL; i++) lambda[i] = t1[i];
    for (int i = 0; i < TT; i++) omega[i] = r1[i];
    deg_lambda = '0;
    for (int i = 0; i < TL; i++) if (t1[i] != '0) deg_lambda = i[$clog2(TT+2)-1:0];
  end

endmodule
