// nml_full_adder: 1-bit NML full adder built from majority voters and
// inverters, spread over six clock zones (two NML clock cycles).
//   zone 1 (ph0): a, b, ci and ~ci enter
//   zone 2 (ph1): co = MAJ(a, b, ci), m = MAJ(a, b, ~ci), ci passes
//   zone 3 (ph2): ~co, m, ci, co
//   zone 4 (ph0): s = MAJ(~co, m, ci), co passes
//   zones 5, 6  : s and co travel to the output side
// The majority-voter decomposition of the sum and the zone assignment are
// this design's own; the gate types and the six-zone length match the
// reference adder. Inputs are taken on a phase-0 tick, outputs are valid
// six ticks later; a new operand set is accepted every cycle.
module nml_full_adder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ph,
  input  logic       a,
  input  logic       b,
  input  logic       ci,
  output logic       s,
  output logic       co
);

  logic [3:0] z1;
  logic [2:0] z2d, z2;
  logic [3:0] z3d, z3;
  logic [1:0] z4d, z4, z5, z6;
  logic       ci_n, co_d, m_d, co_n, s_d;

  nml_gates u_inv_ci (.a(ci), .b(1'b0), .c(1'b0), .maj(), .and_o(), .or_o(), .inv_a(ci_n));
  nml_zone_reg #(.WIDTH(4)) u_z1 (.clk, .rst_n, .en(ph[0]), .d({ci_n, ci, b, a}), .q(z1));

  nml_gates u_mv_co (.a(z1[0]), .b(z1[1]), .c(z1[2]), .maj(co_d), .and_o(), .or_o(), .inv_a());
  nml_gates u_mv_m  (.a(z1[0]), .b(z1[1]), .c(z1[3]), .maj(m_d),  .and_o(), .or_o(), .inv_a());
  assign z2d = {z1[2], m_d, co_d};
  nml_zone_reg #(.WIDTH(3)) u_z2 (.clk, .rst_n, .en(ph[1]), .d(z2d), .q(z2));

  nml_gates u_inv_co (.a(z2[0]), .b(1'b0), .c(1'b0), .maj(), .and_o(), .or_o(), .inv_a(co_n));
  assign z3d = {z2[0], z2[2], z2[1], co_n};
  nml_zone_reg #(.WIDTH(4)) u_z3 (.clk, .rst_n, .en(ph[2]), .d(z3d), .q(z3));

  nml_gates u_mv_s (.a(z3[0]), .b(z3[1]), .c(z3[2]), .maj(s_d), .and_o(), .or_o(), .inv_a());
  assign z4d = {z3[3], s_d};
  nml_zone_reg #(.WIDTH(2)) u_z4 (.clk, .rst_n, .en(ph[0]), .d(z4d), .q(z4));
  nml_zone_reg #(.WIDTH(2)) u_z5 (.clk, .rst_n, .en(ph[1]), .d(z4),  .q(z5));
  nml_zone_reg #(.WIDTH(2)) u_z6 (.clk, .rst_n, .en(ph[2]), .d(z5),  .q(z6));

  assign s  = z6[0];
  assign co = z6[1];

endmodule
