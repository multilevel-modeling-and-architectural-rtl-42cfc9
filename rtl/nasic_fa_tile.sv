// nasic_fa_tile: 1-bit full adder in a single NASIC nanotile.
// Three dual-rail inputs (8 horizontal wires) and two dual-rail outputs
// (4 vertical wires), latency one clock cycle, one new operand set per cycle.
// s = a ^ b ^ ci, co = MAJ(a, b, ci), each with its complement rail.
module nasic_fa_tile
  import nasic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ph,
  input  logic       a,  input logic na,
  input  logic       b,  input logic nb,
  input  logic       ci, input logic nci,
  output logic       s,  output logic ns,
  output logic       co, output logic nco
);

  nasic_tile #(.N_IN(3), .N_OUT(2), .TT(fa_tt())) u_tile (
    .clk, .rst_n, .ph,
    .in_p ({ci, b, a}),
    .in_n ({nci, nb, na}),
    .out_p({co, s}),
    .out_n({nco, ns})
  );

endmodule
