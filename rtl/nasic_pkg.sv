// nasic_pkg: truth tables of the NASIC nanotiles used in this design.
//
// A nanotile with N inputs has one horizontal NAND wire per input minterm
// (no Karnaugh simplification) and, per output, a vertical NAND wire for the
// true rail and one for the complement rail. Its logic is given by a truth
// table: bit (o * 2**N + m) is output o for input minterm m, where input i is
// bit i of m.
package nasic_pkg;

  // 1-bit full adder: inputs {ci, b, a}; outputs {co, s}.
  function automatic logic [15:0] fa_tt();
    logic [15:0] t;
    for (int m = 0; m < 8; m++) begin
      t[m]     = m[0] ^ m[1] ^ m[2];
      t[8 + m] = (m[0] & m[1]) | (m[1] & m[2]) | (m[0] & m[2]);
    end
    return t;
  endfunction

  // Array-multiplier cell: inputs {c, s, y, x}; partial product x&y added to
  // s and c; outputs {carry, sum}.
  function automatic logic [31:0] mul_cell_tt();
    logic [31:0] t;
    logic pp;
    for (int m = 0; m < 16; m++) begin
      pp        = m[0] & m[1];
      t[m]      = pp ^ m[2] ^ m[3];
      t[16 + m] = (pp & m[2]) | (m[2] & m[3]) | (pp & m[3]);
    end
    return t;
  endfunction

  // Accumulator register cell: inputs {init, w, q, d}; output
  // init ? 0 : (w ? d : q), i.e. clear, load or hold.
  function automatic logic [15:0] acc_cell_tt();
    logic [15:0] t;
    for (int m = 0; m < 16; m++)
      t[m] = m[3] ? 1'b0 : (m[2] ? m[0] : m[1]);
    return t;
  endfunction

endpackage
