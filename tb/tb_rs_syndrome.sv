// tb_rs_syndrome: feeds random codewords, with and without random errors, one
// symbol per strobe (gaps between strobes), and compares the 2T syndromes with
// direct evaluation of the received polynomial; checks synd_zero and that
// synd_valid pulses exactly once per block, one clock after the last strobe.
module tb_rs_syndrome;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sym_en = 0, first = 0, last = 0;
  logic [7:0] din = 0;
  logic [7:0] synd [8];
  logic synd_valid, synd_zero;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_syndrome dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    byte_t d [RK];
    cw_t c;
    bit zero;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      for (int j = 0; j < RK; j++) d[j] = byte_t'($urandom);
      c = rencode(d);
      if (blk % 2 == 1)
        for (int e = 0; e < 1 + blk % 6; e++) c[$urandom_range(0, RN-1)] ^= byte_t'($urandom_range(1, 255));
      for (int p = 0; p < RN; p++) begin
        @(negedge clk);
        sym_en = 1; din = c[p]; first = (p == 0); last = (p == RN - 1);
        @(negedge clk);
        sym_en = 0; first = 0; last = 0;
        chk(synd_valid == (p == RN - 1), "synd_valid timing");
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      zero = 1;
      for (int i = 0; i < 2 * RT; i++) begin
        chk(synd[i] == rsynd(c, i + 1), $sformatf("block %0d S%0d", blk, i + 1));
        if (rsynd(c, i + 1) != 0) zero = 0;
      end
      chk(synd_zero == zero, "synd_zero");
      if (blk % 2 == 0) chk(synd_zero, "codeword has zero syndromes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
