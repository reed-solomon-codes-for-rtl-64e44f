// tb_rs_encoder: random messages, one symbol per strobe with random gaps; the
// output stream must be the reference systematic codeword (long division by
// g(x)), each symbol one clock after its strobe; every codeword must have
// zero syndromes.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sym_en = 0;
  logic [7:0] din = 0, dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_encoder dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    byte_t d [RK];
    cw_t c, got;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 50; b++) begin
      for (int j = 0; j < RK; j++) d[j] = byte_t'($urandom);
      c = rencode(d);
      for (int p = 0; p < RN; p++) begin
        @(negedge clk);
        sym_en = 1; din = (p < RK) ? d[p] : byte_t'($urandom);
        @(negedge clk);
        sym_en = 0;
        chk(dout_valid, "valid one clock after strobe");
        chk(dout == c[p], $sformatf("block %0d pos %0d: %h exp %h", b, p, dout, c[p]));
        got[p] = dout;
        @(negedge clk);
        chk(!dout_valid, "valid is one cycle");
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      for (int i = 1; i <= 2 * RT; i++) chk(rsynd(got, i) == 0, "codeword syndrome");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
