// tb_nml_example_circuit: applies all 32 input combinations of the three-zone NML example circuit, one per NML clock cycle, and checks out = (and_in1 & and_in2) | MAJ(mv_in1..3) exactly one cycle (three phase ticks) later.
module tb_nml_example_circuit;
  logic clk = 0, rst_n = 0;
  logic [2:0] ph;
  int checks = 0, failures = 0;
  logic [4:0] in;
  logic out;
  logic [4:0] expq [$];
  nml_phase_gen u_ph (.clk, .rst_n, .ph);
  nml_example_circuit dut (.clk, .rst_n, .ph, .and_in1(in[0]), .and_in2(in[1]), .mv_in1(in[2]), .mv_in2(in[3]), .mv_in3(in[4]), .out);
  always #5 clk = ~clk;

  // one NML clock-cycle boundary: the falling edge before a phase-0 tick
  task automatic boundary();
    do @(negedge clk); while (ph != 3'b001);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int k = 0; k < 70; k++) begin
      boundary();
      if (k >= 1) begin
        logic [4:0] m;
        logic e;
        m = expq.pop_front();
        e = (m[0] & m[1]) | (m[2] & m[3]) | (m[3] & m[4]) | (m[2] & m[4]);
        checks++;
        if (out != e) begin failures++; $display("FAIL k=%0d in=%b got %b", k, m, out); end
      end
      in = (k < 32) ? 5'(k) : 5'($urandom);
      expq.push_back(in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
