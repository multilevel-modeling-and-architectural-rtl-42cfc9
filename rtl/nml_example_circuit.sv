// nml_example_circuit: the three-zone NML example circuit.
//   zone 1 (phase 0): the five inputs enter the circuit
//   zone 2 (phase 1): AND of and_in1/and_in2 and majority of mv_in1..3
//   zone 3 (phase 2): OR of the two results
// out = (and_in1 & and_in2) | MAJ(mv_in1, mv_in2, mv_in3), one NML clock
// cycle (three phase ticks) after the inputs are taken on a phase-0 tick.
// A new input set can be taken every cycle. Structure and timing follow the
// reference example; the gates are nml_gates instances.
module nml_example_circuit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ph,
  input  logic       and_in1,
  input  logic       and_in2,
  input  logic       mv_in1,
  input  logic       mv_in2,
  input  logic       mv_in3,
  output logic       out
);

  logic [4:0] s1;
  logic [1:0] s2d, s2;
  logic       s3d, s3;
  logic       and_o, or_o, maj;

  nml_zone_reg #(.WIDTH(5)) u_z1 (.clk, .rst_n, .en(ph[0]),
    .d({mv_in3, mv_in2, mv_in1, and_in2, and_in1}), .q(s1));

  nml_gates u_and (.a(s1[0]), .b(s1[1]), .c(1'b0), .maj(), .and_o(and_o),
                   .or_o(), .inv_a());
  nml_gates u_mv  (.a(s1[2]), .b(s1[3]), .c(s1[4]), .maj(maj), .and_o(), .or_o(),
                   .inv_a());
  assign s2d = {maj, and_o};

  nml_zone_reg #(.WIDTH(2)) u_z2 (.clk, .rst_n, .en(ph[1]), .d(s2d), .q(s2));

  nml_gates u_or (.a(s2[0]), .b(s2[1]), .c(1'b0), .maj(), .and_o(), .or_o(or_o),
                  .inv_a());
  assign s3d = or_o;

  nml_zone_reg #(.WIDTH(1)) u_z3 (.clk, .rst_n, .en(ph[2]), .d(s3d), .q(s3));

  assign out = s3;

endmodule
