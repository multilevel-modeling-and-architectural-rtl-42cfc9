// nml_phase_gen: three-phase clock system of NanoMagnet Logic, as enables.
//
// An NML circuit is cut into clock zones driven by three overlapping clock
// phases; a signal crosses one zone per phase and three zones per clock
// cycle. In this RTL model one tick of `clk` is one phase: `ph` is one-hot
// and rotates ph[0] -> ph[1] -> ph[2] -> ph[0], so a clock zone register on
// phase k updates on the tick where ph[k] is high. Three ticks make one NML
// clock cycle. After reset ph = 3'b001.
module nml_phase_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] ph
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 3'b001;
    else        ph <= {ph[1:0], ph[2]};
  end

endmodule
