// sw_pe_config: configuration block (PE_Config) of one Smith-Waterman PE.
//
// It turns the shared configuration bus and the control bits of the slot now
// at the PE input into the read/write controls of the PE's computation block:
//   * a bus write addressed to this PE (cfg.pe == PE_ID) becomes a write of
//     score-memory entry cfg.addr, or of the gap register when cfg.addr is
//     GAP_ADDR;
//   * the slot's amino acid becomes the score-memory read address;
//   * a slot that starts a subject sequence asserts `init`, which makes the
//     computation block read zeros instead of its own and diagonal feedback;
//   * a bubble slot asserts `hold`, which makes the block keep its state.
// Purely combinational. The reference design gives only the block's role; the
// bus format and the control encoding are this design's own.
module sw_pe_config
  import sw_pkg::*;
#(
  parameter int unsigned PE_ID = 0
) (
  input  sw_cfg_t            cfg,
  input  sw_token_t          tok,
  output logic               mem_we,
  output logic [AA_W-1:0]    mem_waddr,
  output logic [SCORE_W-1:0] mem_wdata,
  output logic               gap_we,
  output logic [AA_W-1:0]    mem_raddr,
  output logic               init,
  output logic               hold
);

  logic sel;

  always_comb begin
    sel       = cfg.we && (cfg.pe == PE_ID_W'(PE_ID));
    mem_we    = sel && (cfg.addr != GAP_ADDR) && (cfg.addr < AA_W'(NUM_AA));
    gap_we    = sel && (cfg.addr == GAP_ADDR);
    mem_waddr = cfg.addr;
    mem_wdata = cfg.data;
    mem_raddr = tok.aa;
    init      = tok.valid && tok.first;
    hold      = !tok.valid;
  end

endmodule
