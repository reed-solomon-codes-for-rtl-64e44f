// rs_failure: failure indicator of the decoder.
//
// At load (first position of a block in the Chien stage) it takes the degree of
// the error locator and whether the block is active (its syndromes were not all
// zero). On every symbol strobe it counts the error locations flagged by the
// Chien search. all_found is high once the count equals the degree; the decoder
// uses it to switch the Chien search off. On the last position of the block
// done pulses with fail = 1 when the number of locations found differs from the
// degree, or when the locator has degree 0 although errors were detected. An
// inactive (error-free) block never fails. done and fail are registered.
// Comparing the count with the degree, and feeding all_found to the Chien
// switch-off, follow the decoder this design is based on; the degree-0 rule and
// the registered outputs are this implementation's choice.
module rs_failure
  import gf_pkg::*;
#(
  parameter int unsigned TT = T
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,
  input  logic load,
  input  logic active_in,
  input  logic [$clog2(TT+2)-1:0] deg_lambda,
  input  logic err_loc,
  input  logic last,
  output logic all_found,
  output logic done,
  output logic fail,
  output logic [$clog2(TT+2)-1:0] nerr
);

  localparam int unsigned CW = $clog2(TT + 2);

  logic [CW-1:0] cnt, deg, cnt_now;
  logic          active;

  assign cnt_now   = cnt + CW'(err_loc);
  assign all_found = (cnt == deg);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      deg    <= '0;
      active <= 1'b0;
      done   <= 1'b0;
      fail   <= 1'b0;
      nerr   <= '0;
    end else begin
      done <= 1'b0;
      if (sym_en) begin
        if (last) begin
          done <= 1'b1;
          fail <= active && ((cnt_now != deg) || (deg == '0));
          nerr <= active ? cnt_now : '0;
        end
        if (load) begin
          cnt    <= '0;
          deg    <= deg_lambda;
          active <= active_in;
        end else begin
          cnt <= cnt_now;
        end
      end
    end
  end

endmodule
