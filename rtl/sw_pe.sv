// sw_pe: one processing element of the Smith-Waterman systolic array, with
// the timing of an intrinsically pipelined (NanoMagnet Logic) implementation.
//
// In NML every group of three clock zones is a register stage, so the path
// through the PE's blocks is LOOP_LEN clock cycles long, and the feedback
// path that returns the PE's own result to its input is equally long. This
// module models that loop at clock-cycle level:
//   * PE_Config and PE_Calc compute one matrix cell from the slot at the
//     input;
//   * the result, together with the slot, enters a LOOP_LEN-stage line. The
//     line's end is both the output to the next PE and the feedback (Loop1)
//     that returns H_own and M_own to this PE; H and M share the line, so the
//     nested loops have equal length by construction;
//   * the neighbour's score also enters a second LOOP_LEN-stage line (the
//     additional delay loop), whose end is the diagonal score H_diag. Its
//     length equals the feedback loop, which the synchronisation requires.
// Because the loop holds LOOP_LEN independent slots, up to LOOP_LEN subject
// sequences can be interleaved; each sequence must reuse the same slot, i.e.
// feed its amino acids exactly LOOP_LEN cycles apart (bubbles in between are
// allowed and leave the slot's state unchanged).
// LOOP_LEN = 208 is the reference PE; 141 is its folded (U-shaped) variant; 1
// gives the behaviour of a CMOS PE with one-cycle latency.
// Latency: a slot at the input appears at the output LOOP_LEN cycles later.
module sw_pe
  import sw_pkg::*;
#(
  parameter int unsigned PE_ID    = 0,
  parameter int unsigned LOOP_LEN = 208
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sw_cfg_t   cfg,
  input  sw_token_t tok_in,
  input  score_t    h_in,
  input  score_t    m_in,
  output sw_token_t tok_out,
  output score_t    h_out,
  output score_t    m_out
);

  typedef struct packed {
    sw_token_t tok;
    score_t    h;
    score_t    m;
  } stage_t;

  logic               mem_we, gap_we, init, hold;
  logic [AA_W-1:0]    mem_waddr, mem_raddr;
  logic [SCORE_W-1:0] mem_wdata;
  score_t             h_new, m_new, h_diag;

  stage_t loop_in, loop_out;

  sw_pe_config #(.PE_ID(PE_ID)) u_config (
    .cfg      (cfg),
    .tok      (tok_in),
    .mem_we   (mem_we),
    .mem_waddr(mem_waddr),
    .mem_wdata(mem_wdata),
    .gap_we   (gap_we),
    .mem_raddr(mem_raddr),
    .init     (init),
    .hold     (hold)
  );

  sw_pe_calc u_calc (
    .clk      (clk),
    .rst_n    (rst_n),
    .mem_we   (mem_we),
    .mem_waddr(mem_waddr),
    .mem_wdata(mem_wdata),
    .gap_we   (gap_we),
    .mem_raddr(mem_raddr),
    .init     (init),
    .hold     (hold),
    .h_left   (h_in),
    .m_left   (m_in),
    .h_diag   (h_diag),
    .h_own    (loop_out.h),
    .m_own    (loop_out.m),
    .h_new    (h_new),
    .m_new    (m_new)
  );

  // Loop1: the PE path and its feedback, LOOP_LEN cycles.
  assign loop_in = '{tok: tok_in, h: h_new, m: m_new};

  sw_loop_line #(.WIDTH($bits(stage_t)), .DEPTH(LOOP_LEN)) u_loop (
    .clk (clk),
    .rst_n(rst_n),
    .din (loop_in),
    .dout(loop_out)
  );

  // Additional delay loop: the neighbour's score one calculation cycle older.
  sw_loop_line #(.WIDTH(H_W), .DEPTH(LOOP_LEN)) u_diag (
    .clk (clk),
    .rst_n(rst_n),
    .din (h_in),
    .dout(h_diag)
  );

  assign tok_out = loop_out.tok;
  assign h_out   = loop_out.h;
  assign m_out   = loop_out.m;

endmodule
