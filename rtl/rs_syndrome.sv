// rs_syndrome: Syndrome Calculation unit, 2T serial cells.
//
// Cell i (i = 1..2T) evaluates the received polynomial at ALPHA^i by Horner's
// rule: S_i <= S_i * ALPHA^i + r_j on every symbol strobe, the first received
// symbol being the highest-degree coefficient. Each cell is one adder, one
// register and one constant multiplier in the feedback loop. 'first' restarts the
// accumulation (the feedback term is dropped), 'last' marks the final symbol of
// the block: the finished syndromes are copied to the output register, synd_valid
// pulses for one cycle and synd_zero tells whether they are all zero. All 2T
// syndromes are always computed (the syndrome unit itself is never switched off);
// synd_zero is the error detector that lets the rest of the decoder stay idle.
// Outputs are held until the next block completes.
// The serial cell and the hybrid switch-off (detect here, switch off the
// rest) follow the decoder this design is based on; the first/last framing and
// output register are this implementation's choice.
module rs_syndrome
  import gf_pkg::*;
#(
  parameter int unsigned NS = 2 * T   // number of syndromes
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,
  input  logic first,
  input  logic last,
  input  sym_t din,
  output sym_t synd [NS],
  output logic synd_valid,
  output logic synd_zero
);

  sym_t acc [NS];
  sym_t acc_next [NS];
  logic all_zero;

  always_comb begin
    all_zero = 1'b1;
    for (int i = 0; i < NS; i++) begin
      acc_next[i] = (first ? sym_t'(0) : gf_mul(acc[i], gf_alpha_pow(i + 1))) ^ din;
      if (acc_next[i] != '0) all_zero = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NS; i++) begin
        acc[i]  <= '0;
        synd[i] <= '0;
      end
      synd_valid <= 1'b0;
      synd_zero  <= 1'b1;
    end else begin
      synd_valid <= 1'b0;
      if (sym_en) begin
        for (int i = 0; i < NS; i++) acc[i] <= acc_next[i];
        if (last) begin
          for (int i = 0; i < NS; i++) synd[i] <= acc_next[i];
          synd_valid <= 1'b1;
          synd_zero  <= all_zero;
        end
      end
    end
  end

endmodule
