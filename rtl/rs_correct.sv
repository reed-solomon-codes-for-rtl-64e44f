// rs_correct: error correction stage.
//
// Adds (XORs) the error magnitude from the Forney unit to the delayed received
// symbol and registers the result. dout_valid follows en one clock later;
// dout_corrected tells that the symbol was changed. With en low the output
// register holds, so the stage does not toggle between symbols.
// The XOR correction is the design's; the output register is this
// implementation's choice.
module rs_correct
  import gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sym_t data,
  input  sym_t mag,
  output sym_t dout,
  output logic dout_valid,
  output logic dout_corrected
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout           <= '0;
      dout_valid     <= 1'b0;
      dout_corrected <= 1'b0;
    end else begin
      dout_valid <= en;
      if (en) begin
        dout           <= data ^ mag;
        dout_corrected <= (mag != '0);
      end
    end
  end

endmodule
