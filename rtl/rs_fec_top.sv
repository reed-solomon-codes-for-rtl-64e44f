// rs_fec_top: RS(40,32,4) forward error correction for a low-power link.
//
// The transmit side is the systematic encoder, the receive side the low-power
// decoder; they share only clock and reset. Each side takes one 8-bit symbol
// per strobe (tx_sym_en, rx_sym_en). The encoder outputs 40 symbols per 32
// message symbols, one clock after each strobe. The decoder outputs the 32
// corrected data symbols of each block N+3 strobes after they entered, with a
// per-block failure flag; see rs_encoder and rs_decoder for the timing.
module rs_fec_top
  import gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // transmit
  input  logic tx_sym_en,
  input  sym_t tx_din,
  output sym_t tx_dout,
  output logic tx_dout_valid,
  // receive
  input  logic rx_sym_en,
  input  sym_t rx_din,
  output sym_t rx_dout,
  output logic rx_dout_valid,
  output logic rx_dout_corrected,
  output logic rx_blk_done,
  output logic rx_fail,
  output logic rx_blk_bypass,
  output logic [$clog2(T+2)-1:0] rx_nerr
);

  rs_encoder u_enc (
    .clk, .rst_n,
    .sym_en (tx_sym_en), .din (tx_din),
    .dout (tx_dout), .dout_valid (tx_dout_valid)
  );

  rs_decoder u_dec (
    .clk, .rst_n,
    .sym_en (rx_sym_en), .din (rx_din),
    .dout (rx_dout), .dout_valid (rx_dout_valid), .dout_corrected (rx_dout_corrected),
    .blk_done (rx_blk_done), .fail (rx_fail), .blk_bypass (rx_blk_bypass),
    .nerr (rx_nerr)
  );

endmodule
