// nml_decoder: 3-to-8 decoder built from NML gates over three clock zones,
// one of the components of the Smith-Waterman processing element.
//   zone 1 (phase 0): the select code a[2:0] enters
//   zone 2 (phase 1): the four AND terms of a[1:0] (with inverters) and a[2]
//   zone 3 (phase 2): each term ANDed with a[2] or NOT a[2]
// y[k] = (a == k), one NML clock cycle (three phase ticks) after the code is
// taken on a phase-0 tick; a new code every cycle. The two AND levels are
// majority voters with one input fixed at 0. The split of the decoder over
// the zones is this design's choice.
module nml_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ph,
  input  logic [2:0] a,
  output logic [7:0] y
);

  logic [2:0] a1, a1_n;
  logic [3:0] lo;        // lo[j] = (a[1:0] == j)
  logic [3:0] lo2;
  logic       hi2, hi2_n;
  logic [7:0] yd;

  nml_zone_reg #(.WIDTH(3)) u_z1 (.clk, .rst_n, .en(ph[0]), .d(a), .q(a1));

  for (genvar i = 0; i < 3; i++) begin : g_inv
    nml_gates u_inv (.a(a1[i]), .b(1'b0), .c(1'b0), .maj(), .and_o(), .or_o(), .inv_a(a1_n[i]));
  end

  for (genvar j = 0; j < 4; j++) begin : g_lo
    nml_gates u_and (.a(j[0] ? a1[0] : a1_n[0]), .b(j[1] ? a1[1] : a1_n[1]), .c(1'b0),
                     .maj(), .and_o(lo[j]), .or_o(), .inv_a());
  end

  nml_zone_reg #(.WIDTH(5)) u_z2 (.clk, .rst_n, .en(ph[1]), .d({a1[2], lo}), .q({hi2, lo2}));

  nml_gates u_inv_hi (.a(hi2), .b(1'b0), .c(1'b0), .maj(), .and_o(), .or_o(), .inv_a(hi2_n));

  for (genvar k = 0; k < 8; k++) begin : g_out
    nml_gates u_and (.a(lo2[k % 4]), .b(k >= 4 ? hi2 : hi2_n), .c(1'b0), .maj(), .and_o(yd[k]), .or_o(), .inv_a());
  end

  nml_zone_reg #(.WIDTH(8)) u_z3 (.clk, .rst_n, .en(ph[2]), .d(yd), .q(y));

endmodule
