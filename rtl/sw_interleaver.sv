// sw_interleaver: data-interleaving front end of the Smith-Waterman array.
//
// A PE loop of LOOP_LEN cycles accepts a new amino acid of one subject only
// every LOOP_LEN cycles; the cycles in between can carry amino acids of other,
// independent subjects. This block gives each of LANES input streams a fixed
// slot of the loop: a slot counter runs 0..LOOP_LEN-1 and lane k owns the
// cycle where the counter equals k*STRIDE, STRIDE = ceil(LOOP_LEN/LANES)
// (for 208 and 3 lanes: offsets 0, 70, 140, i.e. gaps of 70, 70 and 68
// cycles). LANES = LOOP_LEN fills every cycle and gives a throughput of one
// amino acid per clock cycle; LANES = 1 is the plain, non-interleaved array.
//
// Lane interface (valid/ready, per lane): `lane_tok[k]` with its valid bit
// is offered by the source; `lane_ready[k]` is high in lane k's slot cycle;
// the amino acid is taken when both are high. A source that is not valid in
// its slot leaves a bubble, which the PEs treat as "no change" for that lane.
// The chosen slot is registered: `tok_out` follows the slot cycle by one clock.
module sw_interleaver
  import sw_pkg::*;
#(
  parameter int unsigned LOOP_LEN = 208,
  parameter int unsigned LANES    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sw_token_t        lane_tok   [LANES],
  output logic [LANES-1:0] lane_ready,
  output sw_token_t        tok_out,
  output logic [$clog2(LOOP_LEN+1)-1:0] slot
);

  localparam int unsigned STRIDE = (LOOP_LEN + LANES - 1) / LANES;
  localparam int unsigned CNT_W  = $clog2(LOOP_LEN+1);

  logic [CNT_W-1:0] cnt;
  sw_token_t        pick;

  always_comb begin
    pick = '0;
    for (int k = 0; k < int'(LANES); k++) begin
      lane_ready[k] = (cnt == CNT_W'(k * STRIDE));
      if (lane_ready[k] && lane_tok[k].valid) pick = lane_tok[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      tok_out <= '0;
    end else begin
      cnt     <= (cnt == CNT_W'(LOOP_LEN-1)) ? '0 : cnt + 1'b1;
      tok_out <= pick;
    end
  end

  assign slot = cnt;

  // Static configuration rule: every lane needs a slot of its own.
  initial assert (LANES >= 1 && LANES <= LOOP_LEN)
    else $error("sw_interleaver: LANES must be 1..LOOP_LEN");

endmodule
