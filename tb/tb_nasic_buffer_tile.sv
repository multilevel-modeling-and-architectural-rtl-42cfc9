// tb_nasic_buffer_tile: sends random 4-bit dual-rail words through a buffer tile; checks they come out unchanged, complement rails included, exactly one cycle later.
module tb_nasic_buffer_tile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  logic [3:0] ip, op, on;
  logic [3:0] expq [$];
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_buffer_tile #(.WIDTH(4)) dut (.clk, .rst_n, .ph, .in_p(ip), .in_n(~ip), .out_p(op), .out_n(on));
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
    ip = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      boundary();
      if (k >= 1) begin
        logic [3:0] e;
        e = expq.pop_front();
        checks++;
        if (op != e || on != ~e) begin failures++; $display("FAIL k=%0d got %h exp %h", k, op, e); end
      end
      ip = 4'($urandom);
      expq.push_back(ip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
