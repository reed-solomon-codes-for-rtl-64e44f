// tb_rs_zigbee_frames: link traffic of a low-rate personal-area network.
// Frames are 128-byte data frames, and one in three is followed by a 5-byte
// acknowledgement. Each frame is cut into 32-byte blocks, the last one padded
// with zeros (a 128-byte frame fills 4 blocks, an acknowledgement 1). The
// blocks go through the encoder, a channel that corrupts each symbol with a
// probability of 4%, and the decoder. Every frame whose blocks carry at
// most T errors each must come back intact, and the decoder must flag no
// failure for them. Blocks with more errors are counted.
module tb_rs_zigbee_frames;
  import rs_ref_pkg::*;
  localparam int NFRAMES = 24;
  localparam int SP = 8;
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

  // block list built from the frame list
  localparam int MAXB = NFRAMES * 5;
  byte_t blk_data [MAXB][RK];
  byte_t blk_err  [MAXB][RN];
  int    blk_ne   [MAXB];
  int    blk_frame [MAXB];
  int    nblk = 0;
  int    frame_len [NFRAMES * 2];
  bit    frame_bad [NFRAMES * 2];
  int    nfr = 0;

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      int lens [2];
      int nl;
      lens[0] = 128; lens[1] = 5;
      nl = (f % 3 == 0) ? 2 : 1;
      for (int k = 0; k < nl; k++) begin
        int L, nb;
        L = lens[k];
        nb = (L + RK - 1) / RK;
        frame_len[nfr] = L;
        frame_bad[nfr] = 0;
        for (int b = 0; b < nb; b++) begin
          blk_frame[nblk] = nfr;
          blk_ne[nblk] = 0;
          for (int j = 0; j < RK; j++)
            blk_data[nblk][j] = (b * RK + j < L) ? byte_t'($urandom) : 8'h00;
          for (int p = 0; p < RN; p++) begin
            blk_err[nblk][p] = ($urandom_range(0, 999) < 40) ? byte_t'($urandom_range(1, 255)) : 8'h00;
            if (blk_err[nblk][p] != 0) blk_ne[nblk]++;
          end
          if (blk_ne[nblk] > RT) frame_bad[nfr] = 1;
          nblk++;
        end
        nfr++;
      end
    end
  end

  int tx_pos = 0, tx_blk = 0;
  assign rx_sym_en = tx_dout_valid;
  assign rx_din    = tx_dout ^ ((tx_blk < nblk) ? blk_err[tx_blk][tx_pos] : 8'h00);
  always @(posedge clk) if (rst_n && tx_dout_valid) begin
    if (tx_pos == RN - 1) begin tx_pos <= 0; tx_blk <= tx_blk + 1; end
    else tx_pos <= tx_pos + 1;
  end

  initial begin
    #1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < nblk + 2; b++)
      for (int p = 0; p < RN; p++) begin
        @(negedge clk);
        tx_sym_en = 1;
        tx_din = (b < nblk && p < RK) ? blk_data[b][p] : 8'h00;
        @(negedge clk);
        tx_sym_en = 0;
        repeat (SP - 2) @(negedge clk);
      end
  end

  int ob = 0, oj = 0;
  int frames_ok = 0, frames_bad = 0, blocks_corrected = 0, blocks_clean = 0;
  bit frame_mismatch [NFRAMES * 2];
  initial for (int f = 0; f < NFRAMES * 2; f++) frame_mismatch[f] = 0;
  always @(posedge clk) if (rst_n && ob < nblk) begin
    if (rx_dout_valid) begin
      if (rx_dout != blk_data[ob][oj]) frame_mismatch[blk_frame[ob]] = 1;
      oj++;
    end
    if (rx_blk_done) begin
      if (blk_ne[ob] <= RT) begin
        chk(!rx_fail, $sformatf("block %0d with %0d errors flagged failed", ob, blk_ne[ob]));
        chk(int'(rx_nerr) == blk_ne[ob], "error count");
        if (blk_ne[ob] == 0) blocks_clean++; else blocks_corrected++;
      end
      // end of a frame
      if (ob == nblk - 1 || blk_frame[ob + 1] != blk_frame[ob]) begin
        if (!frame_bad[blk_frame[ob]]) begin
          chk(!frame_mismatch[blk_frame[ob]], $sformatf("frame %0d (%0d bytes) payload", blk_frame[ob], frame_len[blk_frame[ob]]));
          frames_ok++;
        end else frames_bad++;
      end
      ob++; oj = 0;
    end
  end

  initial begin
    #1;
    wait (ob == nblk);
    repeat (20) @(posedge clk);
    $display("frames %0d in %0d blocks: %0d recovered, %0d with an uncorrectable block; blocks clean %0d, corrected %0d",
             nfr, nblk, frames_ok, frames_bad, blocks_clean, blocks_corrected);
    chk(frames_ok > 0 && blocks_corrected > 0 && blocks_clean > 0, "traffic exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((MAXB + 4) * RN * SP + 2000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at block %0d", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
