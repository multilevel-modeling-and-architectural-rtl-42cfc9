// sw_pkg: shared types and constants of the Smith-Waterman systolic accelerator.
//
// The accelerator aligns a query protein (one amino acid stored per processing
// element) against subject proteins streamed through a linear systolic array.
// Amino acids use a 5-bit code (23 symbols: the 20 standard residues plus the
// ambiguity codes B, Z and X). Scores are 9-bit unsigned as in the reference
// design's 9-bit parallelism; substitution scores are 5-bit signed; the gap
// penalty is linear and unsigned. The widths of the code, the substitution
// score and the subject tag are this design's own choices.
package sw_pkg;

  localparam int unsigned NUM_AA   = 23;  // amino-acid symbols with a score each
  localparam int unsigned AA_W     = 5;   // amino-acid code width
  localparam int unsigned H_W      = 9;   // alignment-score width
  localparam int unsigned SCORE_W  = 5;   // signed substitution-score width
  localparam int unsigned GAP_W    = 4;   // gap-penalty width
  localparam int unsigned ID_W     = 8;   // subject-sequence tag width
  localparam int unsigned PE_ID_W  = 4;   // PE index width on the config bus

  // Config-bus address that writes the gap register instead of a score entry.
  localparam logic [AA_W-1:0] GAP_ADDR = 5'd31;

  typedef logic [H_W-1:0] score_t;

  // One slot of the systolic stream. A slot with valid=0 is a bubble: the PEs
  // keep the state of that slot unchanged while it passes.
  typedef struct packed {
    logic            valid;
    logic            first;  // first amino acid of a subject sequence
    logic            last;   // last amino acid of a subject sequence
    logic [AA_W-1:0] aa;
    logic [ID_W-1:0] id;     // subject tag, returned with the result
  } sw_token_t;

  // Configuration write: one score entry (or the gap penalty) of one PE.
  typedef struct packed {
    logic               we;
    logic [PE_ID_W-1:0] pe;
    logic [AA_W-1:0]    addr;
    logic [SCORE_W-1:0] data;
  } sw_cfg_t;

  // Saturating addition of a signed substitution score to an unsigned score;
  // negative results clamp to zero, overflow clamps to the maximum.
  function automatic score_t add_score(score_t h, logic signed [SCORE_W-1:0] s);
    logic signed [H_W+1:0] t;
    t = $signed({2'b00, h}) + (H_W+2)'(s);
    if (t < 0) return '0;
    if (t > $signed((H_W+2)'({H_W{1'b1}}))) return '1;
    return t[H_W-1:0];
  endfunction

  // Unsigned subtraction of the gap penalty, clamped at zero.
  function automatic score_t sub_gap(score_t h, logic [GAP_W-1:0] g);
    return (h > score_t'(g)) ? h - score_t'(g) : '0;
  endfunction

  function automatic score_t max2(score_t a, score_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
