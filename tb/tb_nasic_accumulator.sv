// tb_nasic_accumulator: drives the area-optimised 6-bit NASIC accumulator: clear, then a series of writes with operands held NBITS+2 cycles, comparing the accumulator with a software model after each write (including wrap-around), and checking that the sum is not settled before NBITS cycles.
module tb_nasic_accumulator;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  localparam int N = 6;
  localparam int SETTLE = N + 2;
  logic [N-1:0] a, b, s;
  logic ci, init, w, co;
  int model, early_wrong = 0, overflows = 0;
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_accumulator #(.NBITS(N), .FB_LAT(2)) dut (.clk, .rst_n, .ph, .a, .b, .ci, .init, .w, .s, .co);
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
    a = 0; b = 0; ci = 0; init = 0; w = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    boundary(); init = 1;
    boundary(); init = 0;
    boundary();
    checks++;
    if (s != 0) begin failures++; $display("FAIL clear: %0d", s); end
    model = 0;
    for (int k = 0; k < 80; k++) begin
      int sum;
      a = N'($urandom); b = N'($urandom); ci = 1'($urandom);
      if (k < 3) begin a = 6'd3; b = 6'd2; ci = 0; end
      sum = model + int'(a) + int'(b) + int'(ci);
      repeat (SETTLE - 1) boundary();
      w = 1;
      boundary();
      w = 0;
      boundary();
      checks++;
      if (int'(s) != (sum % 64) || co != (sum >= 64)) begin
        failures++; $display("FAIL k=%0d got %0d/%0d exp %0d", k, s, co, sum);
      end
      if (sum >= 64) overflows++;
      model = sum % 64;
      // a write one cycle too early must not have given the same result
      if (k % 5 == 4) begin
        a = 6'h3f; b = 6'h00; ci = 1;
        sum = model + 64;
        boundary();
        w = 1; boundary(); w = 0; boundary();
        if (int'(s) != (sum % 64)) early_wrong++;
        // restore the model from what was written
        model = int'(s);
        boundary();
      end
    end
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL no overflow exercised"); end
    checks++;
    if (early_wrong == 0) begin failures++; $display("FAIL early write gave the settled result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
