// nasic_buffer_tile: NASIC buffer tile. It implements no logic: each of its
// WIDTH dual-rail signals passes a one-input nanotile (identity function),
// which regenerates the levels and delays the signal by one clock cycle.
// Chains of buffer tiles form the pre-skew and de-skew networks.
module nasic_buffer_tile #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ph,
  input  logic [WIDTH-1:0] in_p,
  input  logic [WIDTH-1:0] in_n,
  output logic [WIDTH-1:0] out_p,
  output logic [WIDTH-1:0] out_n
);

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    nasic_tile #(.N_IN(1), .N_OUT(1), .TT(2'b10)) u_tile (
      .clk, .rst_n, .ph,
      .in_p(in_p[i]), .in_n(in_n[i]), .out_p(out_p[i]), .out_n(out_n[i]));
  end

endmodule
