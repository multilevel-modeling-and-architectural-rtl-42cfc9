// nml_delay: an NML wire of 3*CYCLES clock zones, i.e. a delay of CYCLES
// NML clock cycles for WIDTH signals (the skew and deskew lines of the
// pipelined adders). The wire starts on phase 0 and ends on phase 2.
// CYCLES = 0 is a plain connection.
module nml_delay #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned CYCLES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       ph,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (CYCLES == 0) begin : g_wire
    assign q = d;
  end else begin : g_zones
    logic [WIDTH-1:0] z [3*CYCLES+1];
    assign z[0] = d;
    for (genvar i = 0; i < int'(3*CYCLES); i++) begin : g_z
      nml_zone_reg #(.WIDTH(WIDTH)) u_zone (
        .clk(clk), .rst_n(rst_n), .en(ph[i%3]), .d(z[i]), .q(z[i+1]));
    end
    assign q = z[3*CYCLES];
  end

endmodule
