// tb_nasic_rca: checks the NASIC ripple-carry adder in both forms.
// With skew networks: random operands every cycle, every sum compared with
// a + b + ci exactly NBITS cycles later (latency and full throughput).
// Without networks: operands held NBITS cycles, result compared then, and
// checked not yet settled one cycle earlier for at least one case.
module tb_nasic_rca;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  logic [N-1:0] a, b, s, a2, b2, s2;
  logic ci, co, ci2, co2;
  int checks = 0, failures = 0, early_wrong = 0;

  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_rca #(.NBITS(N), .SKEW_NETWORKS(1'b1)) dut (.clk, .rst_n, .ph, .a, .b, .ci, .s, .co);
  nasic_rca #(.NBITS(N), .SKEW_NETWORKS(1'b0)) dut2 (.clk, .rst_n, .ph, .a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));

  always #5 clk = ~clk;

  // one NASIC cycle boundary: the falling edge before an Hpre tick
  task automatic boundary();
    do @(negedge clk); while (ph != 4'b0001);
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N:0] expq [$];
  initial begin
    a = 0; b = 0; ci = 0; a2 = 0; b2 = 0; ci2 = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // pipelined form
    for (int k = 0; k < 200 + N; k++) begin
      boundary();
      if (k >= N) begin
        logic [N:0] e;
        e = expq.pop_front();
        checks++;
        if ({co, s} != e) begin failures++; $display("FAIL skew k=%0d got %h exp %h", k, {co, s}, e); end
      end
      a = N'($urandom); b = N'($urandom); ci = 1'($urandom);
      if (k < 3) begin a = '1; b = (k == 0) ? 1 : 0; ci = (k == 1); end
      expq.push_back({1'b0, a} + {1'b0, b} + (N+1)'(ci));
    end
    // area-optimised form: hold N cycles
    for (int k = 0; k < 60; k++) begin
      logic [N:0] e;
      boundary();
      a2 = N'($urandom); b2 = N'($urandom); ci2 = 1'($urandom);
      if (k == 0) begin a2 = '1; b2 = 0; ci2 = 1; end
      e = {1'b0, a2} + {1'b0, b2} + (N+1)'(ci2);
      repeat (N - 1) boundary();
      if ({co2, s2} != e) early_wrong++;
      boundary();
      checks++;
      if ({co2, s2} != e) begin failures++; $display("FAIL noskew k=%0d got %h exp %h", k, {co2, s2}, e); end
    end
    checks++;
    if (early_wrong == 0) begin failures++; $display("FAIL: result never needed all %0d cycles", N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
