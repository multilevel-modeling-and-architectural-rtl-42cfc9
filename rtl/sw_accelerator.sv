// sw_accelerator: Smith-Waterman protein-alignment accelerator with NML
// timing: the data interleaver (sw_interleaver) feeding the linear systolic
// array (sw_systolic_array) of N_PE processing elements.
//
// Up to LANES subject sequences are aligned against the stored query at the
// same time, each in its own slot of the LOOP_LEN-cycle PE loop. Lane k sends
// its amino acids with a valid/ready handshake; the result of each subject
// leaves on `res_*` with the tag the source gave it. Query scores and gap
// penalty are written with `cfg` before the subjects are sent.
// Timing: amino acids of one lane are taken every LOOP_LEN cycles; the result
// follows the last one by 1 + N_PE*LOOP_LEN cycles.
// Defaults: 8 PEs and a 208-cycle loop as in the reference NML design, 3-way
// interleaving as in its interleaving experiment.
module sw_accelerator
  import sw_pkg::*;
#(
  parameter int unsigned N_PE     = 8,
  parameter int unsigned LOOP_LEN = 208,
  parameter int unsigned LANES    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sw_cfg_t          cfg,
  input  sw_token_t        lane_tok [LANES],
  output logic [LANES-1:0] lane_ready,
  output logic             res_valid,
  output logic [ID_W-1:0]  res_id,
  output score_t           res_max
);

  sw_token_t tok;
  logic [$clog2(LOOP_LEN+1)-1:0] slot;

  sw_interleaver #(.LOOP_LEN(LOOP_LEN), .LANES(LANES)) u_ilv (
    .clk       (clk),
    .rst_n     (rst_n),
    .lane_tok  (lane_tok),
    .lane_ready(lane_ready),
    .tok_out   (tok),
    .slot      (slot)
  );

  sw_systolic_array #(.N_PE(N_PE), .LOOP_LEN(LOOP_LEN)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg      (cfg),
    .tok_in   (tok),
    .res_valid(res_valid),
    .res_id   (res_id),
    .res_max  (res_max)
  );

endmodule
