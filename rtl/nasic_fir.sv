// nasic_fir: direct-form FIR filter of NASIC arithmetic blocks,
//     y[n] = sum_{k=0}^{TAPS-1} coef[k] * x[n-k]
// with unsigned NBITS-bit samples and coefficients.
//
// Structure: a chain of buffer tiles gives x[n-k] (one tile per sample
// delay); TAPS array multipliers form the products in parallel (latency
// LM = 3*NBITS-2); a chain of TAPS-1 ripple-carry adders with skew networks
// (latency LR = ACC_W) sums them, and product k waits in a delay block of
// (k-1)*LR cycles so that it meets the running sum. One sample is taken per
// clock cycle; y[n] appears LATENCY = LM + (TAPS-1)*LR cycles later.
// Defaults: 8 taps (order 7) of 4-bit data as in the reference filter.
// The chained (rather than tree) adder arrangement is this design's reading
// of the block diagram. Coefficients are static inputs: change them only
// when the output is not used for LATENCY cycles.
module nasic_fir #(
  parameter int unsigned NBITS = 4,
  parameter int unsigned TAPS  = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [3:0]                             ph,
  input  logic [NBITS-1:0]                       x,
  input  logic [TAPS-1:0][NBITS-1:0]             coef,
  output logic [2*NBITS+$clog2(TAPS)-1:0]        y
);

  localparam int unsigned ACC_W = 2*NBITS + $clog2(TAPS);
  localparam int unsigned LR    = ACC_W;

  logic [NBITS-1:0] xp [TAPS], xn [TAPS];
  logic [2*NBITS-1:0] prod [TAPS];
  logic [ACC_W-1:0] sum [TAPS];

  assign xp[0] = x;
  assign xn[0] = ~x;

  for (genvar k = 0; k < int'(TAPS); k++) begin : g_tap
    if (k > 0) begin : g_xd
      nasic_buffer_tile #(.WIDTH(NBITS)) u_xdly (
        .clk, .rst_n, .ph, .in_p(xp[k-1]), .in_n(xn[k-1]), .out_p(xp[k]), .out_n(xn[k]));
    end
    // in cycle n multiplier k sees x[n-k]: all products of y[n] leave together
    nasic_array_mult #(.NBITS(NBITS)) u_mul (
      .clk, .rst_n, .ph, .a(xp[k]), .b(coef[k]), .p(prod[k]));
  end

  assign sum[0] = ACC_W'(prod[0]);

  for (genvar k = 1; k < int'(TAPS); k++) begin : g_add
    logic [ACC_W-1:0] pd_p, pd_n;
    nasic_delay #(.WIDTH(ACC_W), .CYCLES((k-1)*LR)) u_sync (
      .clk, .rst_n, .ph,
      .in_p(ACC_W'(prod[k])), .in_n(~ACC_W'(prod[k])), .out_p(pd_p), .out_n(pd_n));
    nasic_rca #(.NBITS(ACC_W), .SKEW_NETWORKS(1'b1)) u_rca (
      .clk, .rst_n, .ph, .a(sum[k-1]), .b(pd_p), .ci(1'b0), .s(sum[k]), .co());
  end

  assign y = sum[TAPS-1];

endmodule
