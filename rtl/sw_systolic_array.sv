// sw_systolic_array: linear Smith-Waterman systolic array of N_PE processing
// elements (sw_pe), PE k holding query amino acid k.
//
// Subject amino acids enter PE 0 as slots (sw_token_t) and move one PE every
// LOOP_LEN clock cycles; the left border of PE 0 reads scores of zero. When
// the slot carrying the last amino acid of a subject leaves the last PE,
// `res_valid` pulses and `res_max` is the best local-alignment score of the
// whole query against that subject, tagged with the subject's `res_id`.
// Latency from the last amino acid in to the result out: N_PE*LOOP_LEN cycles.
// A subject of n amino acids fed in one slot takes (n-1+N_PE)*LOOP_LEN cycles.
// The query scores and the gap are written through `cfg` (one entry per
// cycle, any time no slot of the addressed PE is in use).
module sw_systolic_array
  import sw_pkg::*;
#(
  parameter int unsigned N_PE     = 8,
  parameter int unsigned LOOP_LEN = 208
) (
  input  logic            clk,
  input  logic            rst_n,
  input  sw_cfg_t         cfg,
  input  sw_token_t       tok_in,
  output logic            res_valid,
  output logic [ID_W-1:0] res_id,
  output score_t          res_max
);

  sw_token_t tok [N_PE+1];
  score_t    h   [N_PE+1];
  score_t    m   [N_PE+1];

  assign tok[0] = tok_in;
  assign h[0]   = '0;
  assign m[0]   = '0;

  for (genvar k = 0; k < int'(N_PE); k++) begin : g_pe
    sw_pe #(.PE_ID(k), .LOOP_LEN(LOOP_LEN)) u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg    (cfg),
      .tok_in (tok[k]),
      .h_in   (h[k]),
      .m_in   (m[k]),
      .tok_out(tok[k+1]),
      .h_out  (h[k+1]),
      .m_out  (m[k+1])
    );
  end

  assign res_valid = tok[N_PE].valid && tok[N_PE].last;
  assign res_id    = tok[N_PE].id;
  assign res_max   = m[N_PE];

endmodule
