// rs_delay_line: delay line between the received stream and the error
// correction.
//
// Only data symbols are stored: parity symbols are never corrected or output,
// so they are not written. It is a first-in first-out memory (an array that
// maps to a RAM block) with its own write and read pointers; it is read only
// when a data symbol is due at the output, so both memory ports are enabled
// only when needed. With the decoder latency of N+3 symbol periods at most 35
// data symbols are in flight, so DEPTH = 36 entries of 8 bits (288 bits) suffice.
// The read is asynchronous: dout is the oldest stored symbol. count is the
// occupancy. Writing a full or reading an empty memory is an error (asserted).
// Storing data only, the precise enables and the 288-bit size follow the
// decoder this design is based on; the FIFO organisation is this
// implementation's choice.
module rs_delay_line #(
  parameter int unsigned DEPTH = 36,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               din,
  input  logic                       rd_en,
  output logic [W-1:0]               dout,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= inc(wp);
      if (rd_en) rp <= inc(rp);
      count <= count + ($clog2(DEPTH+1))'(wr_en) - ($clog2(DEPTH+1))'(rd_en);
    end
  end

  assign dout = mem[rp];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en && !rd_en |-> count < ($clog2(DEPTH+1))'(DEPTH))
    else $error("delay line overflow");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> count != '0)
    else $error("delay line read while empty");

endmodule
