// nasic_phase_gen: four-phase control of NASIC dynamic nanotiles.
//   ph[0] Hpre  - precharge of the horizontal wires (tile inputs are taken)
//   ph[1] Heva  - evaluation of the horizontal wires
//   ph[2] Vpre  - precharge of the vertical wires
//   ph[3] Veva  - evaluation of the vertical wires (tile outputs are ready)
// One tick of `clk` is one phase; four ticks make one NASIC clock cycle. `ph`
// is one-hot and starts at Hpre after reset. The reference design lets Vpre
// overlap Heva; here the phases are strictly sequential, which keeps the
// one-cycle tile latency.
module nasic_phase_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] ph
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 4'b0001;
    else        ph <= {ph[2:0], ph[3]};
  end

endmodule
