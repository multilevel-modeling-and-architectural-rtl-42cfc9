// nasic_booth_mult: NBITS x NBITS signed radix-4 Booth multiplier with the
// timing of a NASIC tile pipeline.
//
// The multiplier B is scanned in overlapping triplets (B[i+1], B[i], B[i-1]),
// i = 0, 2, 4, ..., with B[-1] = 0. Each triplet selects vp in {0, +-A,
// +-2A}; vp is added to the partial product P and A is multiplied by 4 for
// the next digit:
//     000 -> 0   001 -> +A  010 -> +A  011 -> +2A
//     100 -> -2A 101 -> -A  110 -> -A  111 -> 0     (bits B[i+1] B[i] B[i-1])
// Every digit uses two tile levels, each one clock cycle long: the encoder
// and multiplexers that form vp, then the adder/subtractor. With
// D = ceil(NBITS/2) digits the latency is 2*D cycles and a new operand pair is
// taken every cycle. Registers update at Veva (ph[3]) and the operands are
// taken at the Hpre that follows, like the outputs and inputs of a nanotile.
// The datapath of each level is written at word level, not as individual
// nanotiles; the triplet table is the standard radix-4 recoding.
module nasic_booth_mult #(
  parameter int unsigned NBITS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                ph,
  input  logic signed [NBITS-1:0]   a,
  input  logic signed [NBITS-1:0]   b,
  output logic signed [2*NBITS-1:0] p
);

  localparam int unsigned D  = (NBITS + 1) / 2;
  localparam int unsigned PW = 2*NBITS;

  typedef logic signed [PW-1:0] word_t;

  typedef struct packed {
    word_t             a;     // multiplicand, already scaled by 4**k
    logic [2*D:0]      b;     // {sign-extended B, B[-1] = 0}
    word_t             p;     // partial product
    word_t             vp;    // selected multiple (encoder level output)
  } stage_t;

  stage_t enc_q [D];   // after the encoder/multiplexer level of digit k
  stage_t add_q [D];   // after the adder/subtractor level of digit k
  stage_t in_s;
  stage_t src [D];     // input of digit k: the operands or digit k-1

  // vp selection of Table "vp" (bits B[i+1], B[i], B[i-1])
  function automatic word_t sel_vp(logic [2:0] t, word_t m);
    unique case (t)
      3'b001, 3'b010: return m;
      3'b011:         return m <<< 1;
      3'b100:         return -(m <<< 1);
      3'b101, 3'b110: return -m;
      default:        return '0;
    endcase
  endfunction

  always_comb begin
    in_s.a  = word_t'(a);
    in_s.b  = {{(2*D-NBITS){b[NBITS-1]}}, b, 1'b0};
    in_s.p  = '0;
    in_s.vp = '0;
  end

  always_comb begin
    for (int k = 0; k < int'(D); k++) src[k] = (k == 0) ? in_s : add_q[k == 0 ? 0 : k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(D); k++) begin
        enc_q[k] <= '0;
        add_q[k] <= '0;
      end
    end else if (ph[3]) begin
      for (int k = 0; k < int'(D); k++) begin
        // level 1: encoder and multiplexers
        enc_q[k]    <= src[k];
        enc_q[k].vp <= sel_vp(src[k].b[2*k +: 3], src[k].a);
        // level 2: adder/subtractor, then A <= 4*A for the next digit
        add_q[k].p  <= enc_q[k].p + enc_q[k].vp;
        add_q[k].a  <= enc_q[k].a <<< 2;
        add_q[k].b  <= enc_q[k].b;
        add_q[k].vp <= '0;
      end
    end
  end

  assign p = add_q[D-1].p;

endmodule
