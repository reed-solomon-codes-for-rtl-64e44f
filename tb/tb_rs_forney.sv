// tb_rs_forney: the magnitude must be num / den (reference inverse) when
// requested, with the inverter asked for den; with no request the inverter
// operand and the magnitude are zero.
module tb_rs_forney;
  import rs_ref_pkg::*;
  logic req;
  logic [7:0] num, den, inv_x, inv_y, mag;
  logic inv_req;
  int checks = 0, failures = 0;
  rs_forney dut (.*);
  assign inv_y = rinv(inv_x);
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    for (int n = 0; n < 2000; n++) begin
      req = (n % 4 != 3);
      num = byte_t'($urandom);
      den = byte_t'($urandom_range(1, 255));
      #1;
      if (req) begin
        chk(inv_req && inv_x == den, "inverter request");
        chk(rmul(mag, den) == num, $sformatf("mag %h for %h/%h", mag, num, den));
      end else begin
        chk(!inv_req && inv_x == 0 && mag == 0, "idle");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
