// tb_gf_cgf_mul: exhaustive check of the composite-field multiplier against the
// schoolbook reference product, plus the order of ALPHA (must be 255).
module tb_gf_cgf_mul;
  import rs_ref_pkg::*;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;
  gf_cgf_mul dut (.a, .b, .p);
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p !== rmul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h = %h exp %h", a, b, p, rmul(a, b));
        end
      end
    // ALPHA has order 255
    begin
      logic [7:0] x;
      int ord;
      x = 8'h12; ord = 1;
      while (x != 8'h01 && ord < 300) begin a = x; b = 8'h12; #1; x = p; ord++; end
      checks++;
      if (ord != 255) begin failures++; $display("FAIL order of alpha %0d", ord); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
