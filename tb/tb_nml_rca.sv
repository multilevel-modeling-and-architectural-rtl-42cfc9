// tb_nml_rca: streams random operand pairs, one per NML clock cycle, through the 9-bit pipelined NML ripple-carry adder at its default size and compares {co, s} with a + b + ci exactly 2*9 cycles later (latency and throughput).
module tb_nml_rca;
  logic clk = 0, rst_n = 0;
  logic [2:0] ph;
  int checks = 0, failures = 0;
  localparam int N = 9;
  localparam int LAT = 2*N;
  logic [N-1:0] a, b, s;
  logic ci, co;
  logic [N:0] expq [$];
  nml_phase_gen u_ph (.clk, .rst_n, .ph);
  nml_rca dut (.clk, .rst_n, .ph, .a, .b, .ci, .s, .co);
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
    for (int k = 0; k < 300 + LAT; k++) begin
      boundary();
      if (k >= LAT) begin
        logic [N:0] e;
        e = expq.pop_front();
        checks++;
        if ({co, s} != e) begin failures++; $display("FAIL k=%0d got %h exp %h", k, {co, s}, e); end
      end
      a = N'($urandom); b = N'($urandom); ci = 1'($urandom);
      if (k < 2) begin a = '1; b = 0; ci = 1; end
      expq.push_back({1'b0, a} + {1'b0, b} + (N+1)'(ci));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
