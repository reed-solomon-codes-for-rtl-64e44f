// tb_rs_failure: random blocks of N positions with a locator degree and a
// number of flagged locations. all_found must follow count == degree, and on
// the last position (which is also the load of the next block, as in the
// decoder) done/fail/nerr must report a mismatch, or degree 0, as a failure,
// never for an inactive block.
module tb_rs_failure;
  logic clk = 0, rst_n = 0;
  logic sym_en = 0, load = 0, active_in = 0, err_loc = 0, last = 0;
  logic [2:0] deg_lambda = 0, nerr;
  logic all_found, done, fail;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_failure dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  int dg [201], act [201], nf;
  bit flag [40];
  initial begin
    int cnt, nfail = 0, nok = 0;
    for (int b = 0; b <= 200; b++) begin
      dg[b] = $urandom_range(0, 4);
      act[b] = (b % 5 != 0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    sym_en = 1; load = 1; deg_lambda = 3'(dg[0]); active_in = act[0][0];
    @(negedge clk);
    sym_en = 0; load = 0;
    for (int b = 0; b < 200; b++) begin
      nf = (b % 3 == 0) ? $urandom_range(0, 4) : dg[b];
      if (!act[b]) nf = 0;
      for (int p = 0; p < 40; p++) flag[p] = 0;
      for (int k = 0; k < nf; k++) begin
        int q;
        do q = $urandom_range(0, 39); while (flag[q]);
        flag[q] = 1;
      end
      cnt = 0;
      for (int p = 0; p < 40; p++) begin
        if (act[b]) chk(all_found == (cnt == dg[b]), "all_found");
        sym_en = 1; err_loc = flag[p];
        if (p == 39) begin
          last = 1; load = 1; deg_lambda = 3'(dg[b+1]); active_in = act[b+1][0];
        end
        @(negedge clk);
        if (flag[p]) cnt++;
        sym_en = 0; err_loc = 0; last = 0; load = 0;
        chk(done == (p == 39), "done timing");
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      chk(fail == (act[b] && (cnt != dg[b] || dg[b] == 0)),
          $sformatf("fail act=%0d cnt=%0d deg=%0d", act[b], cnt, dg[b]));
      chk(nerr == (act[b] ? 3'(cnt) : 3'd0), "nerr");
      if (fail) nfail++; else nok++;
    end
    chk(nfail > 0 && nok > 0, "both outcomes seen");
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
