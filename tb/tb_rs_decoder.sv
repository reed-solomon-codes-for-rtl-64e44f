// tb_rs_decoder: end-to-end test of the decoder. Random messages are encoded
// by the reference encoder, corrupted by a pattern chosen per block (none; one
// error; four errors in the first quarter; four errors reaching the end with
// three in the last quarter, the measured configurations; errors on parity
// only; random 1..4; beyond T) and sent one symbol per strobe with 5..10
// clocks between strobes. For every block with at most T errors the 32 output
// symbols must equal the message, nerr the number of errors, fail low and
// blk_bypass high exactly for error-free blocks. Every output must come
// N+3 strobes after its input. The testbench also counts how often each
// mechanism of the decoder acted: error-free bypass, Chien switch-off before the
// last position, parity errors left uncorrected, Forney corrections, shared
// inverter use by both units, failures, and a full delay line.
module tb_rs_decoder;
  import rs_ref_pkg::*;
  localparam int NB = 120;
  logic clk = 0, rst_n = 0;
  logic sym_en = 0;
  logic [7:0] din = 0, dout;
  logic dout_valid, dout_corrected, blk_done, fail, blk_bypass;
  logic [2:0] nerr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_decoder dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  byte_t msg [NB][RK];
  int    nerrs [NB];
  bit    parity_only [NB];
  int    strobes = 0;

  // mechanism counters
  int n_bypass = 0, n_early_off = 0, n_parity_kept = 0, n_corrected = 0;
  int n_eea_inv = 0, n_fny_inv = 0, n_fail = 0, max_dl = 0, n_blocks = 0;

  function automatic void make_block(int b, output cw_t r);
    cw_t c;
    int ty, ne;
    bit used [RN];
    for (int j = 0; j < RK; j++) msg[b][j] = byte_t'($urandom);
    c = rencode(msg[b]);
    r = c;
    for (int p = 0; p < RN; p++) used[p] = 0;
    ty = b % 8;
    parity_only[b] = (ty == 4);
    case (ty)
      0: ne = 0;
      1: ne = 1;
      2: ne = 4;
      3: ne = 4;
      4: ne = 2;
      5: ne = $urandom_range(1, 4);
      6: ne = $urandom_range(5, 8);
      default: ne = 4;
    endcase
    nerrs[b] = ne;
    for (int e = 0; e < ne; e++) begin
      int p;
      do begin
        case (ty)
          2: p = $urandom_range(0, 9);
          3: p = (e == 0) ? $urandom_range(0, 29) : $urandom_range(30, 39);
          4: p = $urandom_range(RK, RN - 1);
          default: p = $urandom_range(0, RN - 1);
        endcase
      end while (used[p]);
      used[p] = 1;
      r[p] ^= byte_t'($urandom_range(1, 255));
    end
  endfunction

  // stimulus
  initial begin
    cw_t r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB + 2; b++) begin
      if (b < NB) make_block(b, r);
      else for (int p = 0; p < RN; p++) r[p] = 0;   // flush
      for (int p = 0; p < RN; p++) begin
        @(negedge clk);
        sym_en = 1; din = r[p];
        @(negedge clk);
        sym_en = 0;
        repeat ($urandom_range(3, 8)) @(negedge clk);
      end
    end
  end

  // output checking
  int ob = 0, oj = 0, cur_corr = 0;
  always @(posedge clk) if (rst_n) begin
    if (sym_en) strobes <= strobes + 1;
    if (dut.eea_inv_gnt) n_eea_inv++;
    if (dut.fny_inv_req) n_fny_inv++;
    if (int'(dut.dl_count) > max_dl) max_dl = int'(dut.dl_count);
    if (sym_en && dut.chien_valid && !dut.chien_bypass && dut.all_found && dut.cpos < 6'(RN - 1)
        && dut.cpos == 6'(RN - 2)) n_early_off++;
    if (dout_valid && ob < NB) begin
      // output follows the strobe of input symbol 40*ob+oj by N+3 strobes
      chk(strobes - 1 == RN * ob + oj + RN + 3, $sformatf("latency block %0d sym %0d", ob, oj));
      if (nerrs[ob] <= RT) chk(dout == msg[ob][oj], $sformatf("block %0d sym %0d: %h exp %h", ob, oj, dout, msg[ob][oj]));
      if (dout_corrected) begin n_corrected++; cur_corr++; end
      oj++;
    end
    if (blk_done && ob < NB) begin
      chk(oj == RK, "32 symbols per block");
      n_blocks++;
      if (blk_bypass) n_bypass++;
      if (fail) n_fail++;
      if (nerrs[ob] <= RT) begin
        chk(!fail, $sformatf("block %0d (%0d errors) flagged failed", ob, nerrs[ob]));
        chk(int'(nerr) == nerrs[ob], $sformatf("block %0d nerr %0d exp %0d", ob, nerr, nerrs[ob]));
        chk(blk_bypass == (nerrs[ob] == 0), "bypass flag");
        if (parity_only[ob]) begin
          chk(cur_corr == 0, "parity errors need no correction");
          if (cur_corr == 0) n_parity_kept++;
        end
      end
      ob++; oj = 0; cur_corr = 0;
    end
  end

  initial begin
    wait (ob == NB);
    repeat (20) @(posedge clk);
    $display("blocks %0d, bypassed %0d, Chien off early %0d, parity-only blocks %0d, corrected symbols %0d",
             n_blocks, n_bypass, n_early_off, n_parity_kept, n_corrected);
    $display("inverter: EEA %0d, Forney %0d; failures flagged %0d; delay line peak %0d",
             n_eea_inv, n_fny_inv, n_fail, max_dl);
    chk(n_blocks == NB, "all blocks out");
    chk(n_bypass > 0, "bypass happened");
    chk(n_early_off > 0, "Chien switched off early");
    chk(n_parity_kept > 0, "parity errors left alone");
    chk(n_corrected > 0, "corrections");
    chk(n_eea_inv > 0 && n_fny_inv > 0, "inverter shared");
    chk(n_fail > 0, "failure flagged");
    chk(max_dl <= 36 && max_dl >= 34, "delay line used up to its depth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NB * 40 * 12 + 5000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at block %0d", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
