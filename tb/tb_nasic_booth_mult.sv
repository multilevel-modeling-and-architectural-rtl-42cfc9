// tb_nasic_booth_mult: streams random signed operand pairs through the 8-bit radix-4 Booth multiplier, one per cycle, and compares each product with a*b exactly 2*ceil(N/2) cycles later; corner cases (most negative operands) included. Counts every Booth triplet code that occurred and fails if one never did.
module tb_nasic_booth_mult;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  localparam int N = 8;
  localparam int LAT = 2*((N+1)/2);
  logic signed [N-1:0] a, b;
  logic signed [2*N-1:0] p;
  logic signed [2*N-1:0] expq [$];
  int seen [8];
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_booth_mult #(.NBITS(N)) dut (.clk, .rst_n, .ph, .a, .b, .p);
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
    for (int t = 0; t < 8; t++) seen[t] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 400 + LAT; k++) begin
      boundary();
      if (k >= LAT) begin
        logic signed [2*N-1:0] e;
        e = expq.pop_front();
        checks++;
        if (p !== e) begin failures++; $display("FAIL k=%0d got %0d exp %0d", k, p, e); end
      end
      a = N'($urandom); b = N'($urandom);
      if (k == 0) begin a = -128; b = -128; end
      if (k == 1) begin a = 127; b = -128; end
      if (k == 2) begin a = -1; b = 85; end
      for (int i = 0; i < N; i += 2) seen[{b[i+1], b[i], (i == 0) ? 1'b0 : b[i-1]}]++;
      expq.push_back((2*N)'(a) * (2*N)'(b));
    end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (seen[t] == 0) begin failures++; $display("FAIL triplet %b never used", t[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
