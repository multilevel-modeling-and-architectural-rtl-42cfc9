// tb_nasic_fir: runs the 8-tap, 4-bit NASIC FIR at its default size: random coefficients and a random sample stream (one sample per cycle, with an impulse and a step at the start); every output is compared with the convolution sum computed here, exactly LM + 7*LR cycles after its sample.
module tb_nasic_fir;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  localparam int N = 4, TAPS = 8;
  localparam int ACC_W = 2*N + $clog2(TAPS);
  localparam int LAT = (3*N - 2) + (TAPS - 1) * ACC_W;
  logic [N-1:0] x;
  logic [TAPS-1:0][N-1:0] coef;
  logic [ACC_W-1:0] y;
  int hist [TAPS];
  int expq [$];
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_fir #(.NBITS(N), .TAPS(TAPS)) dut (.clk, .rst_n, .ph, .x, .coef, .y);
  always #5 clk = ~clk;

  task automatic boundary();
    do @(negedge clk); while (ph != 4'b0001);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    for (int k = 0; k < TAPS; k++) begin coef[k] = N'($urandom); hist[k] = 0; end
    coef[0] = 4'hF;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 150 + LAT; n++) begin
      int e;
      boundary();
      if (n >= LAT) begin
        e = expq.pop_front();
        checks++;
        if (int'(y) != e) begin failures++; $display("FAIL n=%0d got %0d exp %0d", n, y, e); end
      end
      x = (n == 0) ? 4'd1 : (n < 12) ? 4'd0 : (n < 30) ? 4'hF : N'($urandom);
      for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      e = 0;
      for (int k = 0; k < TAPS; k++) e += int'(coef[k]) * hist[k];
      expq.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
