// tb_nml_phase_gen: checks the three-phase NML clock enables: phase 0 after reset, one-hot at every tick, and the rotation 0, 1, 2 every three ticks.
module tb_nml_phase_gen;
  logic clk = 0, rst_n = 0;
  logic [2:0] ph;
  int checks = 0, failures = 0;
  logic [2:0] exp_ph;
  nml_phase_gen u_ph (.clk, .rst_n, .ph);

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
    repeat (3) @(posedge clk);
    checks++;
    if (ph != 3'b001) begin failures++; $display("FAIL reset value %b", ph); end
    @(negedge clk) rst_n = 1;
    exp_ph = 3'b001;
    for (int k = 0; k < 30; k++) begin
      @(posedge clk); #1;
      exp_ph = {exp_ph[1:0], exp_ph[2]};
      checks++;
      if (ph != exp_ph || !$onehot(ph)) begin failures++; $display("FAIL tick %0d ph=%b exp %b", k, ph, exp_ph); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
