// tb_nml_mux: a 4-bit NML multiplexer fed with a new random input set every
// NML clock cycle; y must equal (sel ? b : a) of the inputs exactly one NML
// cycle (three phase ticks) earlier.
module tb_nml_mux;
  logic clk = 0, rst_n = 0;
  logic [2:0] ph;
  int checks = 0, failures = 0;
  logic [3:0] a, b, y;
  logic sel;
  logic [3:0] expq [$];
  nml_phase_gen u_ph (.clk, .rst_n, .ph);
  nml_mux #(.WIDTH(4)) dut (.clk, .rst_n, .ph, .a, .b, .sel, .y);
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
    a = 0; b = 0; sel = 0;
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      boundary();
      if (k >= 1) begin
        logic [3:0] e;
        e = expq.pop_front();
        checks++;
        if (y != e) begin failures++; $display("FAIL k=%0d got %h exp %h", k, y, e); end
      end
      a = 4'($urandom); b = 4'($urandom); sel = 1'($urandom);
      expq.push_back(sel ? b : a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
