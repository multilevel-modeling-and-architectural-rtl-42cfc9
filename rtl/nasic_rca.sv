// nasic_rca: NBITS-bit NASIC ripple-carry adder of full-adder nanotiles.
//
// Every tile has a one-cycle latency, so the carry reaches tile i i cycles
// after tile 0 started. With SKEW_NETWORKS = 1 (the structure of the
// reference adder) operand bit i first crosses i buffer tiles (pre-skew)
// and sum bit i then crosses NBITS-1-i buffer tiles (de-skew): all bits see
// a latency of NBITS cycles and a new operand pair is taken every cycle.
// With SKEW_NETWORKS = 0 (the area-optimised form) the networks are left out:
// operands must then be held for NBITS cycles, after which s and co are
// settled; throughput drops to one addition every NBITS cycles.
// Ports are single rail; the complement rails are formed at the boundary.
// Operands are taken at Hpre; results change at Veva.
module nasic_rca #(
  parameter int unsigned NBITS         = 8,
  parameter bit          SKEW_NETWORKS = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ph,
  input  logic [NBITS-1:0] a,
  input  logic [NBITS-1:0] b,
  input  logic             ci,
  output logic [NBITS-1:0] s,
  output logic             co
);

  logic [NBITS:0]   cp, cn;
  logic [NBITS-1:0] ap, an, bp, bn, zp, zn, sp, sn;

  assign cp[0] = ci;
  assign cn[0] = ~ci;

  for (genvar i = 0; i < int'(NBITS); i++) begin : g_bit
    localparam int unsigned PRE  = SKEW_NETWORKS ? i : 0;
    localparam int unsigned POST = SKEW_NETWORKS ? NBITS - 1 - i : 0;
    nasic_delay #(.WIDTH(2), .CYCLES(PRE)) u_pre (
      .clk, .rst_n, .ph,
      .in_p({b[i], a[i]}), .in_n({~b[i], ~a[i]}),
      .out_p({bp[i], ap[i]}), .out_n({bn[i], an[i]}));
    nasic_fa_tile u_fa (
      .clk, .rst_n, .ph,
      .a(ap[i]), .na(an[i]), .b(bp[i]), .nb(bn[i]), .ci(cp[i]), .nci(cn[i]),
      .s(zp[i]), .ns(zn[i]), .co(cp[i+1]), .nco(cn[i+1]));
    nasic_delay #(.WIDTH(1), .CYCLES(POST)) u_post (
      .clk, .rst_n, .ph,
      .in_p(zp[i]), .in_n(zn[i]), .out_p(sp[i]), .out_n(sn[i]));
  end

  assign s  = sp;
  assign co = cp[NBITS];

endmodule
