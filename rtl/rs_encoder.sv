// rs_encoder: systematic encoder for the shortened RS(40,32,4) code.
//
// A linear-feedback shift register of 2T symbol registers divides the message
// by the generator g(x) = prod_{i=1..2T} (x + ALPHA^i): each message symbol is
// added to the top register and the sum, multiplied by the constant generator
// coefficients, is added along the register chain (2T constant multipliers,
// 2T adders, 2T registers, matching the encoder cost the design is sized with).
// Timing: one symbol per strobe sym_en. Positions 0..K-1 of a block take the
// message symbol from din and pass it to dout; positions K..N-1 ignore din and
// shift out the 2T parity symbols. dout/dout_valid are registered (one clock
// after the strobe). Blocks follow each other from reset.
module rs_encoder
  import gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,
  input  sym_t din,
  output sym_t dout,
  output logic dout_valid
);

  localparam int unsigned PW = $clog2(N);
  localparam gen_poly_t   G  = gf_gen_poly();

  logic [PW-1:0] pos;
  sym_t par [NPAR];
  sym_t fb;

  assign fb = din ^ par[NPAR-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      for (int j = 0; j < int'(NPAR); j++) par[j] <= '0;
    end else begin
      dout_valid <= sym_en;
      if (sym_en) begin
        pos <= (pos == PW'(N - 1)) ? '0 : pos + 1'b1;
        if (pos < PW'(K)) begin
          dout <= din;
          par[0] <= gf_mul(fb, G[0]);
          for (int j = 1; j < int'(NPAR); j++) par[j] <= par[j-1] ^ gf_mul(fb, G[j]);
        end else begin
          dout <= par[NPAR-1];
          par[0] <= '0;
          for (int j = 1; j < int'(NPAR); j++) par[j] <= par[j-1];
        end
      end
    end
  end

endmodule
