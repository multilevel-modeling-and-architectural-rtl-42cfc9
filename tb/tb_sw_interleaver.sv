// tb_sw_interleaver: checks the data interleaver at its default size
// (208-cycle loop, 3 lanes): lane k is ready exactly when the slot counter is
// k*70, so the lanes are served 70, 70 and 68 cycles apart; the slot leaves
// on tok_out one cycle later; a lane that is not valid leaves a bubble; no
// token leaves outside a lane slot.
module tb_sw_interleaver;
  import sw_pkg::*;
  localparam int L = 208, LANES = 3;
  logic clk = 0, rst_n = 0;
  sw_token_t lane_tok [LANES];
  logic [LANES-1:0] lane_ready;
  sw_token_t tok_out;
  logic [$clog2(L+1)-1:0] slot;
  int checks = 0, failures = 0, bubbles = 0, taken = 0;
  sw_token_t exp_next;
  int last_ready [LANES];
  int cycle = 0;

  sw_interleaver #(.LOOP_LEN(L), .LANES(LANES)) dut (.clk, .rst_n, .lane_tok, .lane_ready, .tok_out, .slot);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20 * L) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < LANES; k++) begin lane_tok[k] = '0; last_ready[k] = -1; end
    exp_next = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (cycle = 0; cycle < 8 * L; cycle++) begin
      // present random tokens, sometimes not valid
      for (int k = 0; k < LANES; k++) begin
        lane_tok[k] = sw_token_t'($urandom);
        lane_tok[k].valid = ($urandom_range(0, 3) != 0);
      end
      #1;
      // output of the previous cycle's slot
      checks++;
      if (tok_out != exp_next) begin failures++; $display("FAIL cycle %0d tok_out %h exp %h", cycle, tok_out, exp_next); end
      exp_next = '0;
      for (int k = 0; k < LANES; k++) begin
        checks++;
        if (lane_ready[k] != (cycle % L == k * 70)) begin
          failures++; $display("FAIL cycle %0d lane %0d ready=%b", cycle, k, lane_ready[k]);
        end
        if (lane_ready[k]) begin
          if (lane_tok[k].valid) begin exp_next = lane_tok[k]; taken++; end
          else bubbles++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (bubbles == 0 || taken == 0) begin failures++; $display("FAIL bubbles=%0d taken=%0d", bubbles, taken); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
