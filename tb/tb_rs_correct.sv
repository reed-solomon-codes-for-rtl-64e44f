// tb_rs_correct: the registered output must be data XOR magnitude one clock
// after en, with the corrected flag set for a non-zero magnitude, and must
// hold while en is low.
module tb_rs_correct;
  logic clk = 0, rst_n = 0;
  logic en = 0;
  logic [7:0] data = 0, mag = 0, dout;
  logic dout_valid, dout_corrected;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_correct dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    logic [7:0] last_out;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_out = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      data = 8'($urandom);
      mag = ($urandom_range(0, 1) != 0) ? 8'($urandom) : 8'h00;
      @(negedge clk);
      chk(dout_valid == en, "valid");
      if (en) begin
        chk(dout == (data ^ mag), "xor");
        chk(dout_corrected == (mag != 0), "corrected flag");
        last_out = dout;
      end else begin
        chk(dout == last_out, "hold");
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
