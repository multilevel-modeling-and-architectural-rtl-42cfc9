// nasic_accumulator: area-optimised NASIC two-level accumulator,
//     on a write:  acc <= acc + A + B + ci   (mod 2**NBITS; co flags overflow)
// built from two ripple-carry adders in cascade with no pre-skew or de-skew
// networks, and a register row closing the loop.
//
// Level 1 adds A + B + ci, level 2 adds the fed-back accumulator. Without
// skew networks the carries ripple one tile per cycle through operands that
// stay in place, so the operands must be held until the sum has settled; the
// register row (one 4-input tile per bit: clear / load / hold) takes the
// settled sum when `w` is high and clears on `init`. The feedback path from
// the register row to level 2 is FB_LAT cycles long (the register tile plus
// FB_LAT-1 buffer tiles).
//
// Operation: hold a, b, ci for SETTLE = NBITS + 2 cycles and raise `w` in the
// last of them; `s`/`co` show the new value from the cycle after. The next
// operation can start in that cycle provided FB_LAT <= NBITS; a longer loop
// sets the pace instead (one operation per loop length). `init` must be held
// for one cycle. Defaults: 6 bits, feedback latency 2, as in the reference
// optimised accumulator.
module nasic_accumulator
  import nasic_pkg::*;
#(
  parameter int unsigned NBITS  = 6,
  parameter int unsigned FB_LAT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ph,
  input  logic [NBITS-1:0] a,
  input  logic [NBITS-1:0] b,
  input  logic             ci,
  input  logic             init,
  input  logic             w,
  output logic [NBITS-1:0] s,
  output logic             co
);

  logic [NBITS-1:0] s1, s2, fb_p, fb_n;
  logic             co1, co2;
  logic [NBITS:0]   acc_p, acc_n, d;

  nasic_rca #(.NBITS(NBITS), .SKEW_NETWORKS(1'b0)) u_lvl1 (
    .clk, .rst_n, .ph, .a(a), .b(b), .ci(ci), .s(s1), .co(co1));

  nasic_rca #(.NBITS(NBITS), .SKEW_NETWORKS(1'b0)) u_lvl2 (
    .clk, .rst_n, .ph, .a(s1), .b(fb_p), .ci(1'b0), .s(s2), .co(co2));

  // register row: bit NBITS keeps the carry out of the last write
  assign d = {co2 | co1, s2};

  for (genvar i = 0; i <= int'(NBITS); i++) begin : g_reg
    nasic_tile #(.N_IN(4), .N_OUT(1), .TT(acc_cell_tt())) u_reg (
      .clk, .rst_n, .ph,
      .in_p ({init, w, acc_p[i], d[i]}),
      .in_n ({~init, ~w, acc_n[i], ~d[i]}),
      .out_p(acc_p[i]),
      .out_n(acc_n[i]));
  end

  nasic_delay #(.WIDTH(NBITS), .CYCLES(FB_LAT - 1)) u_fb (
    .clk, .rst_n, .ph, .in_p(acc_p[NBITS-1:0]), .in_n(acc_n[NBITS-1:0]),
    .out_p(fb_p), .out_n(fb_n));

  assign s  = acc_p[NBITS-1:0];
  assign co = acc_p[NBITS];

endmodule
