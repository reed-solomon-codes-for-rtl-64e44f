// tb_rs_chien: loads reference Lambda and Omega for random error patterns and
// steps the search through the N positions. At every position err_loc must
// match the error positions, lam_odd and omega_x must equal the reference
// evaluations at X^-1 = ALPHA^-(N-1-p), and omega_x/lam_odd must be the error
// value. Holding en low for a few strobes must freeze the search.
module tb_rs_chien;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sym_en = 0, load = 0, en = 0;
  logic [7:0] lambda [5];
  logic [7:0] omega [4];
  logic err_loc;
  logic [7:0] lam_odd, omega_x;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rs_chien dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  task automatic strobe(bit ld, bit e);
    @(negedge clk);
    sym_en = 1; load = ld; en = e;
    @(negedge clk);
    sym_en = 0; load = 0;
  endtask
  initial begin
    cw_t r;
    byte_t lam [5], om [4], S [8], X, xi, lo, ox;
    int ne, p, hold_at;
    for (int i = 0; i < 5; i++) lambda[i] = 0;
    for (int i = 0; i < 4; i++) omega[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      ne = 1 + n % RT;
      for (int q = 0; q < RN; q++) r[q] = 0;
      for (int e = 0; e < ne; e++) begin
        int q;
        do q = $urandom_range(0, RN - 1); while (r[q] != 0);
        r[q] = byte_t'($urandom_range(1, 255));
      end
      for (int i = 0; i < 8; i++) S[i] = rsynd(r, i + 1);
      for (int i = 0; i < 5; i++) lam[i] = 0;
      lam[0] = 1;
      for (int q = 0; q < RN; q++) if (r[q] != 0) begin
        X = rpow(RN - 1 - q);
        for (int i = 4; i >= 1; i--) lam[i] ^= rmul(X, lam[i-1]);
      end
      for (int i = 0; i < 4; i++) begin
        om[i] = 0;
        for (int j = 0; j <= i; j++) om[i] ^= rmul(S[i-j], lam[j]);
      end
      for (int i = 0; i < 5; i++) lambda[i] = lam[i];
      for (int i = 0; i < 4; i++) omega[i] = om[i];
      strobe(1, 1);
      hold_at = $urandom_range(1, RN - 2);
      p = 0;
      while (p < RN) begin
        en = 1;
        #1;
        xi = rpow(-(RN - 1 - p));
        lo = 0; ox = 0;
        for (int i = 1; i < 5; i += 2) lo ^= rmul(lam[i], rpow(-(RN - 1 - p) * i));
        for (int i = 0; i < 4; i++) ox ^= rmul(om[i], rpow(-(RN - 1 - p) * (i + 1)));
        chk(err_loc == (r[p] != 0), $sformatf("err_loc p=%0d", p));
        chk(lam_odd == lo, $sformatf("lam_odd p=%0d", p));
        chk(omega_x == ox, $sformatf("omega_x p=%0d", p));
        if (r[p] != 0) chk(rmul(omega_x, rinv(lam_odd)) == r[p], $sformatf("magnitude p=%0d", p));
        if (p == hold_at) begin
          repeat (2) begin
            strobe(0, 0);
            chk(err_loc == 0, "err_loc low while off");
          end
        end
        strobe(0, 1);
        p++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
