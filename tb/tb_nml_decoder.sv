// tb_nml_decoder: applies every 3-bit code and then random codes to the NML
// 3-to-8 decoder, one per NML clock cycle, and checks that exactly output
// y[code] is set one NML cycle (three phase ticks) later.
module tb_nml_decoder;
  logic clk = 0, rst_n = 0;
  logic [2:0] ph;
  int checks = 0, failures = 0;
  logic [2:0] a;
  logic [7:0] y;
  logic [2:0] expq [$];
  nml_phase_gen u_ph (.clk, .rst_n, .ph);
  nml_decoder dut (.clk, .rst_n, .ph, .a, .y);
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
    a = 0;
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      boundary();
      if (k >= 1) begin
        logic [2:0] e;
        e = expq.pop_front();
        checks++;
        if (y != 8'(1 << e)) begin failures++; $display("FAIL k=%0d code %0d got %b", k, e, y); end
      end
      a = (k < 8) ? 3'(k) : 3'($urandom);
      expq.push_back(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
