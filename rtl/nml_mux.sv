// nml_mux: WIDTH-bit 2-to-1 multiplexer built from NML gates over three
// clock zones, as used inside the Smith-Waterman processing element.
//   zone 1 (phase 0): inputs a, b and sel enter
//   zone 2 (phase 1): a AND NOT sel, b AND sel (inverter and two AND voters)
//   zone 3 (phase 2): OR of the two terms
// y = sel ? b : a, one NML clock cycle (three phase ticks) after the inputs
// are taken on a phase-0 tick; a new input set every cycle. The gate
// arrangement is the usual AND-OR form of a multiplexer written with
// majority voters; the zone count per stage matches the other NML circuits.
module nml_mux #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       ph,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] a1, b1, ta, tb, ta2, tb2, yd;
  logic             s1, s1_n;

  nml_zone_reg #(.WIDTH(2*WIDTH+1)) u_z1 (.clk, .rst_n, .en(ph[0]), .d({sel, b, a}), .q({s1, b1, a1}));

  nml_gates u_inv (.a(s1), .b(1'b0), .c(1'b0), .maj(), .and_o(), .or_o(), .inv_a(s1_n));

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_and
    nml_gates u_and_a (.a(a1[i]), .b(s1_n), .c(1'b0), .maj(), .and_o(ta[i]), .or_o(), .inv_a());
    nml_gates u_and_b (.a(b1[i]), .b(s1),   .c(1'b0), .maj(), .and_o(tb[i]), .or_o(), .inv_a());
  end

  nml_zone_reg #(.WIDTH(2*WIDTH)) u_z2 (.clk, .rst_n, .en(ph[1]), .d({tb, ta}), .q({tb2, ta2}));

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_or
    nml_gates u_or (.a(ta2[i]), .b(tb2[i]), .c(1'b0), .maj(), .and_o(), .or_o(yd[i]), .inv_a());
  end

  nml_zone_reg #(.WIDTH(WIDTH)) u_z3 (.clk, .rst_n, .en(ph[2]), .d(yd), .q(y));

endmodule
