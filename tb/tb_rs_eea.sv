// tb_rs_eea: key-equation solver. For random patterns of 1..T errors the
// syndromes are computed by the reference, the solver is run, and its error
// locator and error magnitude polynomials must be one common multiple of the
// reference Lambda(x) = prod(1 + X_j x) and Omega = S*Lambda mod x^2T; the
// degree must equal the number of errors. The testbench plays the inverter
// (reference search) and sometimes withholds the grant; the solve time must
// stay within 13 clocks plus the withheld cycles.
module tb_rs_eea;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [7:0] synd [8];
  logic inv_req, inv_gnt, busy, done;
  logic [7:0] inv_x, inv_y;
  logic [7:0] lambda [5];
  logic [7:0] omega [4];
  logic [2:0] deg_lambda;
  int checks = 0, failures = 0;
  int denied, cycles, maxcyc = 0;
  always #5 clk = ~clk;
  rs_eea dut (.*);
  assign inv_y = rinv(inv_x);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    cw_t r;
    byte_t lam [5], om [4], S [8], X;
    int pos [4];
    int ne;
    inv_gnt = 1;
    for (int i = 0; i < 8; i++) synd[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      ne = 1 + n % RT;
      for (int p = 0; p < RN; p++) r[p] = 0;
      for (int e = 0; e < ne; e++) begin
        int p;
        do p = $urandom_range(0, RN - 1); while (r[p] != 0);
        pos[e] = p;
        r[p] = byte_t'($urandom_range(1, 255));
      end
      for (int i = 0; i < 8; i++) S[i] = rsynd(r, i + 1);
      // reference Lambda
      for (int i = 0; i < 5; i++) lam[i] = 0;
      lam[0] = 1;
      for (int e = 0; e < ne; e++) begin
        X = rpow(RN - 1 - pos[e]);
        for (int i = 4; i >= 1; i--) lam[i] ^= rmul(X, lam[i-1]);
      end
      for (int i = 0; i < 4; i++) begin
        om[i] = 0;
        for (int j = 0; j <= i; j++) om[i] ^= rmul(S[i-j], lam[j]);
      end
      @(negedge clk);
      for (int i = 0; i < 8; i++) synd[i] = S[i];
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1; denied = 0;
      while (!done && cycles < 100) begin
        inv_gnt = (n % 3 == 2) ? ($urandom_range(0, 2) != 0) : 1'b1;
        if (inv_req && !inv_gnt) denied++;
        @(negedge clk);
        cycles++;
      end
      inv_gnt = 1;
      if (cycles > maxcyc) maxcyc = cycles;
      chk(done, "done");
      chk(cycles <= 13 + denied, $sformatf("solve time %0d (denied %0d)", cycles, denied));
      chk(deg_lambda == 3'(ne), $sformatf("deg %0d exp %0d", deg_lambda, ne));
      chk(lambda[0] != 0, "lambda0 nonzero");
      for (int i = 0; i < 5; i++) chk(lambda[i] == rmul(lambda[0], lam[i]), $sformatf("lambda[%0d]", i));
      for (int i = 0; i < 4; i++) chk(omega[i] == rmul(lambda[0], om[i]), $sformatf("omega[%0d]", i));
      repeat (2) @(negedge clk);
    end
    $display("longest solve %0d clocks", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
