// sw_pe_calc: computation block (PE_Calc) of one Smith-Waterman PE.
//
// Holds the substitution scores of the PE's query amino acid against all 23
// amino-acid symbols (a small register file written through the configuration
// block) and a linear gap penalty, and computes one cell of the local
// alignment matrix:
//   H = MAX4(0, H_diag + S(q, s), H_left - gap, H_own - gap)
//   M = max(M_left, M_own, H)
// H_left is the neighbour's result of the previous calculation cycle, H_diag
// the neighbour's result of two calculation cycles ago, H_own this PE's result
// of the previous calculation cycle; M carries the running maximum so that the
// last PE delivers the best local-alignment score of the whole sequence.
// With `init` the own and diagonal inputs read as zero (matrix border); with
// `hold` the block returns its own state unchanged (bubble slot).
// The datapath is combinational; only the score memory and gap register are
// clocked (write in the cycle `mem_we`/`gap_we` is high). Scores saturate
// at zero and at 2^9-1; the saturation and the gap model are this design's
// choices, the MAX4 recurrence and the 23-entry memory follow the reference.
module sw_pe_calc
  import sw_pkg::*;
#(
  parameter logic [GAP_W-1:0] DEFAULT_GAP = 4'd4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mem_we,
  input  logic [AA_W-1:0]    mem_waddr,
  input  logic [SCORE_W-1:0] mem_wdata,
  input  logic               gap_we,
  input  logic [AA_W-1:0]    mem_raddr,
  input  logic               init,
  input  logic               hold,
  input  score_t             h_left,
  input  score_t             m_left,
  input  score_t             h_diag,
  input  score_t             h_own,
  input  score_t             m_own,
  output score_t             h_new,
  output score_t             m_new
);

  logic [SCORE_W-1:0] score_mem [NUM_AA];
  logic [GAP_W-1:0]   gap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_AA); i++) score_mem[i] <= '0;
      gap <= DEFAULT_GAP;
    end else begin
      if (mem_we) score_mem[mem_waddr] <= mem_wdata;
      if (gap_we) gap <= mem_wdata[GAP_W-1:0];
    end
  end

  logic signed [SCORE_W-1:0] s;
  score_t own_h, own_m, diag, h;

  always_comb begin
    s     = (mem_raddr < AA_W'(NUM_AA)) ? $signed(score_mem[mem_raddr]) : '0;
    own_h = init ? '0 : h_own;
    own_m = init ? '0 : m_own;
    diag  = init ? '0 : h_diag;
    // MAX4: zero floor, diagonal match/mismatch, gap from left, gap from own
    h = max2(max2(add_score(diag, s), sub_gap(h_left, gap)), sub_gap(own_h, gap));
    if (hold) begin
      h_new = h_own;
      m_new = m_own;
    end else begin
      h_new = h;
      m_new = max2(max2(m_left, own_m), h);
    end
  end

endmodule
