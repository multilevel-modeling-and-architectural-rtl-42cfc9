// tb_nml_full_adder: streams all eight operand combinations and then random ones, one per NML clock cycle, through the six-zone majority-voter full adder; checks sum and carry exactly two cycles (six ticks) later.
module tb_nml_full_adder;
  logic clk = 0, rst_n = 0;
  logic [2:0] ph;
  int checks = 0, failures = 0;
  logic a, b, ci, s, co;
  logic [2:0] expq [$];
  nml_phase_gen u_ph (.clk, .rst_n, .ph);
  nml_full_adder dut (.clk, .rst_n, .ph, .a, .b, .ci, .s, .co);
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
    a = 0; b = 0; ci = 0;
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      boundary();
      if (k >= 2) begin
        logic [2:0] m;
        m = expq.pop_front();
        checks++;
        if (s != (m[0]^m[1]^m[2]) || co != ((m[0]&m[1])|(m[1]&m[2])|(m[0]&m[2]))) begin
          failures++; $display("FAIL k=%0d m=%b s=%b co=%b", k, m, s, co);
        end
      end
      {ci, b, a} = (k < 8) ? 3'(k) : 3'($urandom);
      expq.push_back({ci, b, a});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
