// tb_rs_fec_top: the whole link at its default sizes. Random messages go
// through the encoder; its output strobe and symbols drive the decoder through
// a channel that adds an error pattern per block (the four measured
// configurations: no error, four errors in the first quarter, four in the first
// three quarters, four reaching the end with three in the last quarter; plus
// random 1..4 errors and patterns beyond T). The decoder must return every
// message of a correctable block, flag no failure, report the number of
// errors, and deliver each symbol N+3 decoder strobes after it entered.
// Counted mechanisms: error-free bypass, early Chien switch-off, Forney
// corrections, parity errors left alone, inverter use by both units, failures.
// With one symbol every 8 clocks a block must be decoded, from its first
// symbol in to its end-of-block flag, within 670 clocks (13.4 us at 50 MHz).
module tb_rs_fec_top;
  import rs_ref_pkg::*;
  localparam int NB = 64;
  localparam int SP = 8;   // clocks per symbol: one 8-bit symbol per bit-serial byte
  logic clk = 0, rst_n = 0;
  logic tx_sym_en = 0, tx_dout_valid;
  logic [7:0] tx_din = 0, tx_dout;
  logic rx_sym_en;
  logic [7:0] rx_din, rx_dout;
  logic rx_dout_valid, rx_dout_corrected, rx_blk_done, rx_fail, rx_blk_bypass;
  logic [2:0] rx_nerr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rs_fec_top dut (.*);

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  byte_t msg [NB][RK];
  byte_t err [NB+2][RN];
  int    nerrs [NB];
  int    tx_pos = 0, tx_blk = 0, strobes = 0;

  // channel: error pattern added to the encoder output
  assign rx_sym_en = tx_dout_valid;
  assign rx_din    = tx_dout ^ ((tx_blk < NB) ? err[tx_blk][tx_pos] : 8'h00);

  always @(posedge clk) if (rst_n && tx_dout_valid) begin
    if (tx_pos == RN - 1) begin tx_pos <= 0; tx_blk <= tx_blk + 1; end
    else tx_pos <= tx_pos + 1;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      bit used [RN];
      int ty, ne;
      for (int p = 0; p < RN; p++) begin err[b][p] = 0; used[p] = 0; end
      for (int j = 0; j < RK; j++) msg[b][j] = byte_t'($urandom);
      ty = b % 6;
      case (ty)
        0: ne = 0;
        1, 2, 3: ne = 4;
        4: ne = $urandom_range(1, 4);
        default: ne = $urandom_range(5, 7);
      endcase
      nerrs[b] = ne;
      for (int e = 0; e < ne; e++) begin
        int p;
        do begin
          case (ty)
            1: p = $urandom_range(0, 9);
            2: p = $urandom_range(0, 29);
            3: p = (e == 0) ? $urandom_range(0, 29) : $urandom_range(30, 39);
            default: p = $urandom_range(0, RN - 1);
          endcase
        end while (used[p]);
        used[p] = 1;
        err[b][p] = byte_t'($urandom_range(1, 255));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB + 2; b++)
      for (int p = 0; p < RN; p++) begin
        @(negedge clk);
        tx_sym_en = 1;
        tx_din = (b < NB && p < RK) ? msg[b][p] : 8'h00;
        @(negedge clk);
        tx_sym_en = 0;
        repeat (SP - 2) @(negedge clk);
      end
  end

  int ob = 0, oj = 0, cur_corr = 0;
  int n_bypass = 0, n_early_off = 0, n_corrected = 0, n_eea_inv = 0, n_fny_inv = 0, n_fail = 0;
  int n_parity_err = 0;
  // decoding time of a block: first decoder strobe of the block to its blk_done,
  // 670 clocks = 13.4 us at 50 MHz
  longint clk_cnt = 0, blk_start [NB+2];
  int max_dec_time = 0;
  always @(posedge clk) begin
    clk_cnt <= clk_cnt + 1;
    if (rst_n && rx_sym_en && tx_pos == 0 && tx_blk < NB + 2) blk_start[tx_blk] <= clk_cnt;
  end
  always @(posedge clk) if (rst_n) begin
    if (rx_sym_en) strobes <= strobes + 1;
    if (dut.u_dec.eea_inv_gnt) n_eea_inv++;
    if (dut.u_dec.fny_inv_req) n_fny_inv++;
    if (rx_sym_en && dut.u_dec.chien_valid && !dut.u_dec.chien_bypass && dut.u_dec.all_found
        && dut.u_dec.cpos == 6'(RN - 2)) n_early_off++;
    if (rx_dout_valid && ob < NB) begin
      chk(strobes - 1 == RN * ob + oj + RN + 3, $sformatf("latency block %0d sym %0d", ob, oj));
      if (nerrs[ob] <= RT) chk(rx_dout == msg[ob][oj], $sformatf("block %0d sym %0d: %h exp %h", ob, oj, rx_dout, msg[ob][oj]));
      if (rx_dout_corrected) begin n_corrected++; cur_corr++; end
      oj++;
    end
    if (rx_blk_done && ob < NB) begin
      int perr;
      perr = 0;
      for (int p = RK; p < RN; p++) if (err[ob][p] != 0) perr++;
      chk(oj == RK, "32 symbols per block");
      if (int'(clk_cnt - blk_start[ob]) > max_dec_time) max_dec_time = int'(clk_cnt - blk_start[ob]);
      chk(clk_cnt - blk_start[ob] <= 670, $sformatf("block %0d decoded in %0d clocks", ob, clk_cnt - blk_start[ob]));
      if (rx_blk_bypass) n_bypass++;
      if (rx_fail) n_fail++;
      if (nerrs[ob] <= RT) begin
        chk(!rx_fail, $sformatf("block %0d flagged failed", ob));
        chk(int'(rx_nerr) == nerrs[ob], "error count");
        chk(rx_blk_bypass == (nerrs[ob] == 0), "bypass flag");
        chk(cur_corr == nerrs[ob] - perr, "only data errors corrected");
        if (perr > 0) n_parity_err += perr;
      end
      ob++; oj = 0; cur_corr = 0;
    end
  end

  initial begin
    wait (ob == NB);
    repeat (20) @(posedge clk);
    $display("bypassed %0d, Chien off early %0d, corrected %0d, parity errors left %0d, failures %0d",
             n_bypass, n_early_off, n_corrected, n_parity_err, n_fail);
    $display("inverter use: EEA %0d, Forney %0d; longest block decode %0d clocks", n_eea_inv, n_fny_inv, max_dec_time);
    chk(n_bypass > 0, "bypass happened");
    chk(n_early_off > 0, "Chien switched off early");
    chk(n_corrected > 0, "corrections");
    chk(n_parity_err > 0, "parity errors seen");
    chk(n_eea_inv > 0 && n_fny_inv > 0, "inverter shared");
    chk(n_fail > 0, "failure flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NB + 3) * RN * SP + 2000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at block %0d", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
