// tb_nasic_array_mult: streams random operand pairs, one per cycle, through the 5-bit NASIC array multiplier and compares each product with a*b exactly 3*N-2 cycles later (latency and throughput).
module tb_nasic_array_mult;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  localparam int N = 5;
  localparam int LAT = 3*N - 2;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  logic [2*N-1:0] expq [$];
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_array_mult #(.NBITS(N)) dut (.clk, .rst_n, .ph, .a, .b, .p);
  always #5 clk = ~clk;

  task automatic boundary();
    do @(negedge clk); while (ph != 4'b0001);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 300 + LAT; k++) begin
      boundary();
      if (k >= LAT) begin
        logic [2*N-1:0] e;
        e = expq.pop_front();
        checks++;
        if (p !== e) begin failures++; $display("FAIL k=%0d got %0d exp %0d", k, p, e); end
      end
      a = N'($urandom); b = N'($urandom);
      if (k < 2) begin a = '1; b = '1; end
      expq.push_back((2*N)'(a) * (2*N)'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
