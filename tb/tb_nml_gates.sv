// tb_nml_gates: checks every input combination of the NML gate set:
// majority, AND and OR (majority with a fixed input) and the inverter.
module tb_nml_gates;
  logic a, b, c, maj, and_o, or_o, inv_a;
  int checks = 0, failures = 0;

  nml_gates dut (.a, .b, .c, .maj, .and_o, .or_o, .inv_a);

  initial begin
    for (int k = 0; k < 8; k++) begin
      {c, b, a} = 3'(k);
      #1;
      checks++;
      if (maj != ((a & b) | (b & c) | (a & c)) || and_o != (a & b) || or_o != (a | b) || inv_a != !a) begin
        failures++; $display("FAIL %b: %b %b %b %b", k[2:0], maj, and_o, or_o, inv_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
