// tb_nasic_fa_tile: drives the full-adder nanotile with every input combination and random streams, one set per cycle; checks sum, carry and their complement rails exactly one cycle later.
module tb_nasic_fa_tile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  logic a, b, ci, s, ns, co, nco;
  logic [2:0] expq [$];
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_fa_tile dut (.clk, .rst_n, .ph, .a, .na(~a), .b, .nb(~b), .ci, .nci(~ci), .s, .ns, .co, .nco);
  always #5 clk = ~clk;

  task automatic boundary();
    do @(negedge clk); while (ph != 4'b0001);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; ci = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      boundary();
      if (k >= 1) begin
        logic [2:0] m;
        m = expq.pop_front();
        checks++;
        if (s != (m[0]^m[1]^m[2]) || co != ((m[0]&m[1])|(m[1]&m[2])|(m[0]&m[2])) || ns != ~s || nco != ~co) begin
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
