// nasic_tile: generic NASIC nanotile (NAND-NAND, dual rail, dynamic logic).
//
// Inputs and outputs come in complementary pairs (p = true rail, n =
// complement rail). The tile has 2**N_IN horizontal wires; wire m is a NAND of
// one rail of every input and goes low exactly when the inputs equal minterm m.
// Each output has two vertical wires: the true rail is a NAND of the
// horizontal wires of the minterms where the truth table TT is 1, the
// complement rail a NAND of the others. This matches the reference tile
// structure without Karnaugh simplification.
//
// Timing, with the four phases of nasic_phase_gen: inputs are taken at Hpre,
// the horizontal wires are evaluated at Heva and held through Vpre, and the
// outputs are evaluated at Veva. Outputs therefore change once per cycle and
// a tile has a latency of one clock cycle; cascaded tiles take the previous
// tile's outputs at their next Hpre. Reset puts every pair at logic 0
// (p = 0, n = 1).
module nasic_tile #(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 2,
  parameter logic [N_OUT*(2**N_IN)-1:0] TT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ph,
  input  logic [N_IN-1:0]  in_p,
  input  logic [N_IN-1:0]  in_n,
  output logic [N_OUT-1:0] out_p,
  output logic [N_OUT-1:0] out_n
);

  localparam int unsigned NH = 2**N_IN;

  logic [N_IN-1:0]  ip, inn;          // inputs held during the cycle
  logic [NH-1:0]    h_eval, h_q, h_v; // horizontal wires
  logic [N_OUT-1:0] vp, vn;           // vertical wires before Veva

  always_comb begin
    for (int m = 0; m < int'(NH); m++) begin
      logic all1;
      all1 = 1'b1;
      for (int i = 0; i < int'(N_IN); i++)
        all1 &= ((m >> i) & 1) != 0 ? ip[i] : inn[i];
      h_eval[m] = ~all1;
    end
    for (int o = 0; o < int'(N_OUT); o++) begin
      logic andp, andn;
      andp = 1'b1;
      andn = 1'b1;
      for (int m = 0; m < int'(NH); m++) begin
        if (TT[o*NH + m]) andp &= h_v[m];
        else              andn &= h_v[m];
      end
      vp[o] = ~andp;
      vn[o] = ~andn;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip    <= '0;
      inn   <= '1;
      h_q   <= '1;
      h_v   <= '1;
      out_p <= '0;
      out_n <= '1;
    end else begin
      if (ph[0]) begin ip <= in_p; inn <= in_n; end  // Hpre
      if (ph[1]) h_q <= h_eval;                      // Heva
      if (ph[2]) h_v <= h_q;                         // Vpre
      if (ph[3]) begin out_p <= vp; out_n <= vn; end // Veva
    end
  end

  // Dual-rail rule: every pair taken at Hpre must be complementary.
  a_dual_rail: assert property (@(posedge clk) disable iff (!rst_n)
    ph[0] |-> (in_p == ~in_n))
    else $error("nasic_tile: input rails not complementary");

endmodule
