// tb_gf_inv_shared: the shared inverter serves whichever unit requests it,
// gives Forney priority, and outputs the inverse of the selected operand
// (checked with the reference product); the operand is zero when idle.
module tb_gf_inv_shared;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic eea_req, fny_req, eea_gnt, fny_gnt;
  logic [7:0] eea_x, fny_x, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gf_inv_shared dut (.*);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    eea_req = 0; fny_req = 0; eea_x = 0; fny_x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      eea_x = 8'($urandom_range(1, 255));
      fny_x = 8'($urandom_range(1, 255));
      case (n % 3)
        0: begin eea_req = 1; fny_req = 0; end
        1: begin eea_req = 0; fny_req = 1; end
        default: begin eea_req = 0; fny_req = 0; end
      endcase
      #1;
      if (eea_req) chk(eea_gnt && !fny_gnt && rmul(y, eea_x) == 8'h01, "eea served");
      else if (fny_req) chk(fny_gnt && !eea_gnt && rmul(y, fny_x) == 8'h01, "forney served");
      else chk(!eea_gnt && !fny_gnt && y == 8'h00, "idle");
    end
    // priority check with assertions disabled (a collision is a scheduling error)
    $assertoff;
    @(negedge clk);
    eea_req = 1; fny_req = 1; eea_x = 8'h33; fny_x = 8'h57;
    #1;
    chk(fny_gnt && !eea_gnt && rmul(y, 8'h57) == 8'h01, "forney priority");
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
