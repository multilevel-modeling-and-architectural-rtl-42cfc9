// nasic_array_mult: NBITS x NBITS unsigned NASIC array multiplier.
//
// Row j adds the partial product a & {b[j]} to the shifted sum of row j-1.
// Each cell is one nanotile (AND of a[i], b[j] feeding a full adder with the
// incoming sum and carry) with a one-cycle latency, so cell (j, i) works in
// cycle i + 2*j: its carry comes from cell (j, i-1) one cycle earlier and its
// sum input from cell (j-1, i+1) one cycle earlier. The skew network delays
// a[i] and b[j] by i + 2*j cycles to meet the cell; the last carry of a row
// needs one extra tile; the de-skew network aligns all product bits to
// LATENCY = 3*NBITS - 2 cycles. A new operand pair is taken every cycle.
// Cell contents and delay counts are this design's derivation of the
// reference block diagram.
module nasic_array_mult #(
  parameter int unsigned NBITS = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         ph,
  input  logic [NBITS-1:0]   a,
  input  logic [NBITS-1:0]   b,
  output logic [2*NBITS-1:0] p
);

  import nasic_pkg::*;

  localparam int unsigned N   = NBITS;
  localparam int unsigned LAT = 3*N - 2;

  // sum and carry outputs of every cell, both rails
  logic sp [N][N], sn [N][N], cp [N][N], cn [N][N];
  logic [2*N-1:0] pp, pn;  // product bits before de-skew
  logic [2*N-1:0] qp, qn;

  for (genvar j = 0; j < int'(N); j++) begin : g_row
    for (genvar i = 0; i < int'(N); i++) begin : g_cell
      localparam int unsigned T = i + 2*j;
      logic xp, xn, yp, yn, sinp, sinn, cinp, cinn;

      nasic_delay #(.WIDTH(2), .CYCLES(T)) u_skew (
        .clk, .rst_n, .ph,
        .in_p({b[j], a[i]}), .in_n({~b[j], ~a[i]}),
        .out_p({yp, xp}), .out_n({yn, xn}));

      if (i == 0) begin : g_c0
        assign cinp = 1'b0; assign cinn = 1'b1;
      end else begin : g_cr
        assign cinp = cp[j][i-1]; assign cinn = cn[j][i-1];
      end

      if (j == 0) begin : g_s0
        assign sinp = 1'b0; assign sinn = 1'b1;
      end else if (i < int'(N) - 1) begin : g_ss
        assign sinp = sp[j-1][i+1]; assign sinn = sn[j-1][i+1];
      end else begin : g_sc
        nasic_delay #(.WIDTH(1), .CYCLES(1)) u_cdly (
          .clk, .rst_n, .ph, .in_p(cp[j-1][N-1]), .in_n(cn[j-1][N-1]),
          .out_p(sinp), .out_n(sinn));
      end

      nasic_tile #(.N_IN(4), .N_OUT(2), .TT(mul_cell_tt())) u_cell (
        .clk, .rst_n, .ph,
        .in_p ({cinp, sinp, yp, xp}),
        .in_n ({cinn, sinn, yn, xn}),
        .out_p({cp[j][i], sp[j][i]}),
        .out_n({cn[j][i], sn[j][i]}));
    end
  end

  // product bits and the cycle they become available
  for (genvar k = 0; k < int'(2*N); k++) begin : g_out
    localparam int unsigned AV = (k < int'(N) - 1) ? 2*k + 1 :
                                 (k < int'(2*N) - 1) ? (k - (N-1)) + 2*(N-1) + 1 : LAT;
    if (k < int'(N) - 1) begin : g_lo
      assign pp[k] = sp[k][0]; assign pn[k] = sn[k][0];
    end else if (k < int'(2*N) - 1) begin : g_hi
      assign pp[k] = sp[N-1][k-(N-1)]; assign pn[k] = sn[N-1][k-(N-1)];
    end else begin : g_top
      assign pp[k] = cp[N-1][N-1]; assign pn[k] = cn[N-1][N-1];
    end
    nasic_delay #(.WIDTH(1), .CYCLES(LAT - AV)) u_deskew (
      .clk, .rst_n, .ph, .in_p(pp[k]), .in_n(pn[k]), .out_p(qp[k]), .out_n(qn[k]));
  end

  assign p = qp;

endmodule
