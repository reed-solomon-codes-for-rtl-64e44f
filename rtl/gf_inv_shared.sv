// gf_inv_shared: the single Galois-field inverter of the decoder, shared by the
// key-equation solver (EEA) and the Forney unit.
//
// An input multiplexer selects the operand of the unit that requests it. The
// decoder pipeline is scheduled so that the two units never ask in the same
// cycle (the EEA of block f+1 runs while the Chien search of block f is on parity
// symbols, where Forney is idle); an assertion checks this. Should it ever
// happen, Forney wins and the EEA, which is told through eea_gnt, waits a cycle.
// With no request the operand is held at zero so the inverter does not toggle.
// Combinational: the inverse is valid in the cycle of the grant.
module gf_inv_shared
  import gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic eea_req,
  input  sym_t eea_x,
  input  logic fny_req,
  input  sym_t fny_x,
  output logic eea_gnt,
  output logic fny_gnt,
  output sym_t y
);

  sym_t x;

  always_comb begin
    fny_gnt = fny_req;
    eea_gnt = eea_req && !fny_req;
    if (fny_gnt)      x = fny_x;
    else if (eea_gnt) x = eea_x;
    else              x = '0;
  end

  gf_cgf_inv u_inv (.x(x), .y(y));

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(eea_req && fny_req))
    else $error("inverter requested by EEA and Forney in the same cycle");

endmodule
