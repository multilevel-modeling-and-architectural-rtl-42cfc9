// nml_zone_reg: one NML clock zone, modelled as a register that takes its
// input on the ticks its clock phase is active and holds it otherwise.
// WIDTH signals cross the zone side by side. Reset clears the zone.
module nml_zone_reg #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
