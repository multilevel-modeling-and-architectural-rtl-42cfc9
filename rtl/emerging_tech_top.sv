// emerging_tech_top: the designs of this repository side by side.
//
//  * NanoMagnet Logic (NML):
//      - sw_accelerator: Smith-Waterman protein alignment, 8 PEs with the
//        208-cycle NML loop, 3-way data interleaving (one NML clock cycle
//        per `clk` tick);
//      - nml_rca: 9-bit pipelined NML ripple-carry adder of majority-voter
//        full adders, and nml_example_circuit, both on the three-phase clock
//        of nml_phase_gen (one phase per `clk` tick, phases on `nml_ph`);
//      - nml_mux (9 bits wide, the score width of the accelerator) and
//        nml_decoder (3-to-8), the gate-level NML forms of two of the
//        processing element's components, on the same three-phase clock.
//  * Nanoscale Application Specific ICs (NASIC), on the four-phase control of
//    nasic_phase_gen (one phase per `clk` tick, phases on `nasic_ph`):
//      - nasic_fir: 8-tap, 4-bit FIR of array multipliers and RCAs;
//      - nasic_booth_mult: 8-bit signed radix-4 Booth multiplier;
//      - nasic_accumulator: 6-bit two-level accumulator without skew networks.
// The designs share only `clk` and `rst_n`; each has its own ports. See the
// individual modules for their timing.
module emerging_tech_top
  import sw_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // Smith-Waterman accelerator
  input  sw_cfg_t          sw_cfg,
  input  sw_token_t        sw_lane_tok [3],
  output logic [2:0]       sw_lane_ready,
  output logic             sw_res_valid,
  output logic [ID_W-1:0]  sw_res_id,
  output score_t           sw_res_max,
  // NML adder and example circuit
  output logic [2:0]       nml_ph,
  input  logic [8:0]       nml_a,
  input  logic [8:0]       nml_b,
  input  logic             nml_ci,
  output logic [8:0]       nml_s,
  output logic             nml_co,
  input  logic [4:0]       nml_ex_in,   // {mv_in3, mv_in2, mv_in1, and_in2, and_in1}
  output logic             nml_ex_out,
  input  logic [8:0]       nml_mux_a,
  input  logic [8:0]       nml_mux_b,
  input  logic             nml_mux_sel,
  output logic [8:0]       nml_mux_y,
  input  logic [2:0]       nml_dec_a,
  output logic [7:0]       nml_dec_y,
  // NASIC blocks
  output logic [3:0]       nasic_ph,
  input  logic [3:0]       fir_x,
  input  logic [7:0][3:0]  fir_coef,
  output logic [10:0]      fir_y,
  input  logic [7:0]       booth_a,
  input  logic [7:0]       booth_b,
  output logic [15:0]      booth_p,
  input  logic [5:0]       acc_a,
  input  logic [5:0]       acc_b,
  input  logic             acc_ci,
  input  logic             acc_init,
  input  logic             acc_w,
  output logic [5:0]       acc_s,
  output logic             acc_co
);

  sw_accelerator u_sw (
    .clk, .rst_n, .cfg(sw_cfg), .lane_tok(sw_lane_tok), .lane_ready(sw_lane_ready),
    .res_valid(sw_res_valid), .res_id(sw_res_id), .res_max(sw_res_max));

  nml_phase_gen u_nml_ph (.clk, .rst_n, .ph(nml_ph));

  nml_rca u_nml_rca (
    .clk, .rst_n, .ph(nml_ph), .a(nml_a), .b(nml_b), .ci(nml_ci), .s(nml_s), .co(nml_co));

  nml_example_circuit u_nml_ex (
    .clk, .rst_n, .ph(nml_ph),
    .and_in1(nml_ex_in[0]), .and_in2(nml_ex_in[1]),
    .mv_in1(nml_ex_in[2]), .mv_in2(nml_ex_in[3]), .mv_in3(nml_ex_in[4]),
    .out(nml_ex_out));

  nml_mux #(.WIDTH(9)) u_nml_mux (
    .clk, .rst_n, .ph(nml_ph), .a(nml_mux_a), .b(nml_mux_b), .sel(nml_mux_sel), .y(nml_mux_y));

  nml_decoder u_nml_dec (.clk, .rst_n, .ph(nml_ph), .a(nml_dec_a), .y(nml_dec_y));

  nasic_phase_gen u_nasic_ph (.clk, .rst_n, .ph(nasic_ph));

  nasic_fir u_fir (
    .clk, .rst_n, .ph(nasic_ph), .x(fir_x), .coef(fir_coef), .y(fir_y));

  nasic_booth_mult u_booth (
    .clk, .rst_n, .ph(nasic_ph), .a(booth_a), .b(booth_b), .p(booth_p));

  nasic_accumulator u_acc (
    .clk, .rst_n, .ph(nasic_ph), .a(acc_a), .b(acc_b), .ci(acc_ci),
    .init(acc_init), .w(acc_w), .s(acc_s), .co(acc_co));

endmodule
