// tb_nasic_tile: drives a 3-input, 2-output nanotile programmed with an arbitrary truth table with random dual-rail inputs every cycle; checks both output rails against the table one cycle later and that outputs only change at the Veva phase.
module tb_nasic_tile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  localparam logic [15:0] TT = 16'b1001_0110_1110_1000;
  logic [2:0] ip;
  logic [1:0] op, on, prev_op;
  logic [2:0] expq [$];
  nasic_phase_gen u_ph (.clk, .rst_n, .ph);
  nasic_tile #(.N_IN(3), .N_OUT(2), .TT(TT)) dut (.clk, .rst_n, .ph, .in_p(ip), .in_n(~ip), .out_p(op), .out_n(on));
  // outputs may change only on a Veva tick
  always @(negedge clk) if (rst_n) begin
    if (op != prev_op && !$past(ph[3])) begin failures++; $display("FAIL output changed outside Veva"); end
    prev_op = op;
  end
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
    ip = 0; prev_op = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      boundary();
      if (k >= 1) begin
        logic [2:0] m;
        m = expq.pop_front();
        checks++;
        if (op[0] != TT[m] || op[1] != TT[8+m] || on != ~op) begin
          failures++; $display("FAIL k=%0d m=%0d op=%b on=%b", k, m, op, on);
        end
      end
      ip = 3'($urandom);
      expq.push_back(ip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
