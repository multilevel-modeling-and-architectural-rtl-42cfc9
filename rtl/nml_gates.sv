// nml_gates: the basic NML logic gates as ideal logic.
//   maj   - majority voter of a, b, c
//   and_o - majority voter with its third input fixed at 0 (a AND b)
//   or_o  - majority voter with its third input fixed at 1 (a OR b)
//   inv_a - inverter (an even number of magnets along a wire)
// Combinational: in NML the gate delay belongs to the clock zone that holds
// the gate, which the surrounding nml_zone_reg registers model.
module nml_gates (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic maj,
  output logic and_o,
  output logic or_o,
  output logic inv_a
);

  function automatic logic mv(logic x, logic y, logic z);
    return (x & y) | (y & z) | (x & z);
  endfunction

  always_comb begin
    maj   = mv(a, b, c);
    and_o = mv(a, b, 1'b0);
    or_o  = mv(a, b, 1'b1);
    inv_a = ~a;
  end

endmodule
