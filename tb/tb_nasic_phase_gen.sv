// tb_nasic_phase_gen: checks the four-phase control: one-hot at every tick, Hpre first after reset, and the order Hpre, Heva, Vpre, Veva repeating every four ticks.
module tb_nasic_phase_gen;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  logic [3:0] exp_ph;
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);

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
    repeat (3) @(posedge clk);
    checks++;
    if (ph != 4'b0001) begin failures++; $display("FAIL reset value %b", ph); end
    @(negedge clk) rst_n = 1;
    exp_ph = 4'b0001;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      exp_ph = {exp_ph[2:0], exp_ph[3]};
      checks++;
      if (ph != exp_ph || !$onehot(ph)) begin failures++; $display("FAIL tick %0d ph=%b exp %b", k, ph, exp_ph); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
