// rs_decoder: low-power decoder for the shortened RS(40,32,4) code.
//
// Received symbols enter on din with a one-cycle strobe sym_en; blocks of N
// symbols follow each other from reset (data first, then the 2T parity
// symbols). Three blocks are in flight, one per stage:
//   1. Syndrome Calculation accumulates block f while the delay line stores its
//      K data symbols. After the last symbol the syndromes are complete.
//   2. If any syndrome is non-zero the EEA solves the key equation; otherwise the
//      block is marked error-free and the EEA, Chien search, Forney unit and
//      inverter stay idle (the rest of the decoder is switched off).
//   3. CHIEN_DELAY symbol periods after the end of the block, the Chien search
//      walks its N positions, one per strobe, in step with the delay line
//      output. A located error on a data position asks Forney for the magnitude,
//      which is XORed onto the delayed symbol. Parity positions are searched
//      only to feed the failure indicator, and the search stops as soon as the
//      number of locations found equals the degree of the error locator.
// The single inverter is shared by the EEA and Forney. The EEA of block f+1 runs
// while the Chien search of block f is on its last CHIEN_DELAY (parity)
// positions, where Forney never asks, so the two do not collide.
//
// Latency: data symbol j of a block is output (dout_valid) one clock after the
// strobe that comes N + CHIEN_DELAY strobes after its own. blk_done pulses
// with fail after the last position of each block; blk_bypass says the block had
// zero syndromes and nerr how many symbols were found in error. Only the K
// data symbols are output. To flush the last block the strobe must keep running
// for N + CHIEN_DELAY more symbol periods.
//
// Timing requirement: the EEA (at most 13 clocks for T=4) starts one clock
// after the last strobe of a block and must finish before the Chien stage loads
// on the CHIEN_DELAY-th strobe after it, so with CHIEN_DELAY = 3 strobes must be
// at least 5 clocks apart. One 8-bit symbol every 8 clocks (a bit-serial
// stream) leaves ample margin. An assertion checks it. DL_DEPTH must be at
// least K + CHIEN_DELAY + 1 (36 for the defaults). The split into units, the shared
// inverter, the stored-data-only delay line and the two switch-off mechanisms
// follow the decoder this design is based on; the pipeline offset CHIEN_DELAY
// and the interface are this implementation's choice.
module rs_decoder
  import gf_pkg::*;
#(
  parameter int unsigned CHIEN_DELAY = 3,
  parameter int unsigned DL_DEPTH    = 36
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,
  input  sym_t din,
  output sym_t dout,
  output logic dout_valid,
  output logic dout_corrected,
  output logic blk_done,
  output logic fail,
  output logic blk_bypass,
  output logic [$clog2(T+2)-1:0] nerr
);

  localparam int unsigned PW = $clog2(N);
  localparam int unsigned DW = $clog2(T + 2);

  // ---------------- position counters ----------------
  logic [PW-1:0] pos_in, cpos;

  always_ff @(posedge clk) begin
    if (!rst_n)      pos_in <= '0;
    else if (sym_en) pos_in <= (pos_in == PW'(N - 1)) ? '0 : pos_in + 1'b1;
  end

  // Chien position: CHIEN_DELAY symbols behind the input, modulo N
  assign cpos = (pos_in >= PW'(CHIEN_DELAY)) ? pos_in - PW'(CHIEN_DELAY)
                                             : pos_in + PW'(N - CHIEN_DELAY);

  // ---------------- syndrome stage ----------------
  sym_t synd [2*T];
  logic synd_valid, synd_zero;

  rs_syndrome u_syn (
    .clk, .rst_n, .sym_en,
    .first (pos_in == '0),
    .last  (pos_in == PW'(N - 1)),
    .din,
    .synd, .synd_valid, .synd_zero
  );

  // ---------------- key equation stage ----------------
  logic eea_valid, eea_bypass;   // a block is waiting for / in the EEA stage
  logic eea_busy, eea_done;
  logic eea_inv_req, eea_inv_gnt;
  sym_t eea_inv_x, inv_y;
  sym_t lambda [T+1];
  sym_t omega [T];
  logic [DW-1:0] deg_lambda;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      eea_valid  <= 1'b0;
      eea_bypass <= 1'b1;
    end else if (synd_valid) begin
      eea_valid  <= 1'b1;
      eea_bypass <= synd_zero;
    end
  end

  rs_eea u_eea (
    .clk, .rst_n,
    .start   (synd_valid && !synd_zero),
    .synd,
    .inv_req (eea_inv_req), .inv_x (eea_inv_x),
    .inv_gnt (eea_inv_gnt), .inv_y (inv_y),
    .busy    (eea_busy), .done (eea_done),
    .lambda, .omega, .deg_lambda
  );

  // ---------------- Chien / Forney / correction stage ----------------
  logic chien_load, chien_valid, chien_bypass, chien_en;
  logic all_found, err_loc, data_pos, last_pos;
  sym_t lam_odd, omega_x, mag, fny_inv_x, dl_dout;
  logic fny_req, fny_inv_req, fny_inv_gnt;

  assign chien_load = sym_en && (cpos == PW'(N - 1));
  assign data_pos   = (cpos < PW'(K));
  assign last_pos   = (cpos == PW'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chien_valid  <= 1'b0;
      chien_bypass <= 1'b1;
    end else if (chien_load) begin
      chien_valid  <= eea_valid;
      chien_bypass <= eea_bypass;
    end
  end

  assign chien_en = chien_valid && !chien_bypass && !all_found;

  rs_chien u_chien (
    .clk, .rst_n, .sym_en,
    .load (chien_load),
    .en   (chien_en),
    .lambda, .omega,
    .err_loc, .lam_odd, .omega_x
  );

  rs_failure u_fail (
    .clk, .rst_n, .sym_en,
    .load      (chien_load),
    .active_in (eea_valid && !eea_bypass),
    .deg_lambda,
    .err_loc   (err_loc),
    .last      (last_pos && chien_valid),
    .all_found,
    .done      (blk_done),
    .fail,
    .nerr
  );

  assign fny_req = sym_en && err_loc && data_pos;

  rs_forney u_forney (
    .req (fny_req), .num (omega_x), .den (lam_odd),
    .inv_req (fny_inv_req), .inv_x (fny_inv_x), .inv_y (inv_y),
    .mag
  );

  gf_inv_shared u_inv (
    .clk, .rst_n,
    .eea_req (eea_inv_req), .eea_x (eea_inv_x),
    .fny_req (fny_inv_req), .fny_x (fny_inv_x),
    .eea_gnt (eea_inv_gnt), .fny_gnt (fny_inv_gnt),
    .y (inv_y)
  );

  logic dl_wr, dl_rd;
  logic [$clog2(DL_DEPTH+1)-1:0] dl_count;

  assign dl_wr = sym_en && (pos_in < PW'(K));
  assign dl_rd = sym_en && chien_valid && data_pos;

  rs_delay_line #(.DEPTH(DL_DEPTH), .W(M)) u_dl (
    .clk, .rst_n,
    .wr_en (dl_wr), .din,
    .rd_en (dl_rd), .dout (dl_dout),
    .count (dl_count)
  );

  rs_correct u_corr (
    .clk, .rst_n,
    .en   (dl_rd),
    .data (dl_dout),
    .mag  (chien_bypass ? sym_t'(0) : mag),
    .dout, .dout_valid, .dout_corrected
  );

  always_ff @(posedge clk) begin
    if (!rst_n) blk_bypass <= 1'b0;
    else if (sym_en && last_pos && chien_valid) blk_bypass <= chien_bypass;
  end

  // the key equation must be solved before its block reaches the Chien stage
  a_eea_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    chien_load && eea_valid && !eea_bypass |-> !eea_busy)
    else $error("EEA not finished when the Chien search starts");

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(eea_inv_req && fny_inv_req));

  logic unused;
  assign unused = ^{eea_done, fny_inv_gnt, dl_count};

endmodule
