// tb_rs_delay_line: random writes and reads (never past full or empty)
// against a queue model; checks the output symbol and the occupancy, and fills
// the memory to its 36 entries.
module tb_rs_delay_line;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] din = 0, dout;
  logic [5:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_delay_line dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    logic [7:0] q [$];
    int maxocc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      chk(count == 6'(q.size()), "count");
      if (q.size() > 0) chk(dout == q[0], $sformatf("dout %h exp %h", dout, q[0]));
      // bias towards filling in the first half, emptying in the second
      wr_en = (q.size() < 36) && ($urandom_range(0, 99) < ((n % 1000) < 500 ? 70 : 30));
      rd_en = (q.size() > 0) && ($urandom_range(0, 99) < ((n % 1000) < 500 ? 30 : 70));
      din = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(din);
      if (q.size() > maxocc) maxocc = q.size();
      wr_en = 0; rd_en = 0;
    end
    chk(maxocc == 36, $sformatf("filled to %0d", maxocc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
