// tb_gf_cgf_inv: exhaustive check of the composite-field inverter: x * y = 1
// for every non-zero x (reference product), and 0 maps to 0.
module tb_gf_cgf_inv;
  import rs_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  gf_cgf_inv dut (.x, .y);
  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if ((i == 0 && y !== 8'h00) || (i != 0 && rmul(x, y) !== 8'h01)) begin
        failures++;
        if (failures < 10) $display("FAIL inv(%h) = %h", x, y);
      end
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
