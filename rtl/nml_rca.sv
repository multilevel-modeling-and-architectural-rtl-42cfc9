// nml_rca: NUM_RCA-bit pipelined NML ripple-carry adder.
//
// A chain of nml_full_adder cells, each two NML clock cycles long. The carry
// leaves cell i two cycles after its operands entered, so operand bits i are
// delayed 2*i cycles on the way in (skew lines) and sum bit i is delayed
// 2*(NUM_RCA-1-i) cycles on the way out (deskew lines). Every bit therefore
// sees the same latency, 2*NUM_RCA cycles (6*NUM_RCA phase ticks), and the
// adder takes a new operand pair every cycle. Operands are taken on phase-0
// ticks. Structure, 9-bit default and line lengths follow the reference
// adder; the carry out leaves together with the sum.
module nml_rca #(
  parameter int unsigned NUM_RCA = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2:0]         ph,
  input  logic [NUM_RCA-1:0] a,
  input  logic [NUM_RCA-1:0] b,
  input  logic               ci,
  output logic [NUM_RCA-1:0] s,
  output logic               co
);

  logic [NUM_RCA:0]   c;
  logic [NUM_RCA-1:0] as, bs, z;

  assign c[0] = ci;

  for (genvar i = 0; i < int'(NUM_RCA); i++) begin : g_bit
    nml_delay #(.WIDTH(2), .CYCLES(2*i)) u_skew (
      .clk, .rst_n, .ph, .d({b[i], a[i]}), .q({bs[i], as[i]}));
    nml_full_adder u_fa (
      .clk, .rst_n, .ph, .a(as[i]), .b(bs[i]), .ci(c[i]), .s(z[i]), .co(c[i+1]));
    nml_delay #(.WIDTH(1), .CYCLES(2*(NUM_RCA-1-i))) u_deskew (
      .clk, .rst_n, .ph, .d(z[i]), .q(s[i]));
  end

  assign co = c[NUM_RCA];

endmodule
