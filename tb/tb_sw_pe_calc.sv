// tb_sw_pe_calc: loads the 23-entry score memory and the gap register of the
// computation block, then applies random neighbour, diagonal and own scores
// and checks H = MAX4(0, diag+S, left-gap, own-gap) and the running maximum,
// including the matrix border (init) and the hold of a bubble slot.
module tb_sw_pe_calc;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mem_we, gap_we, init, hold;
  logic [AA_W-1:0] mem_waddr, mem_raddr;
  logic [SCORE_W-1:0] mem_wdata;
  score_t h_left, m_left, h_diag, h_own, m_own, h_new, m_new;
  int checks = 0, failures = 0;
  int tbl [23];
  int gap;

  sw_pe_calc dut (.clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .gap_we, .mem_raddr, .init, .hold,
                  .h_left, .m_left, .h_diag, .h_own, .m_own, .h_new, .m_new);

  always #5 clk = ~clk;

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_we = 0; gap_we = 0; init = 0; hold = 0; mem_raddr = 0; mem_waddr = 0; mem_wdata = 0;
    h_left = 0; m_left = 0; h_diag = 0; h_own = 0; m_own = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    gap = 5;
    for (int a = 0; a < 23; a++) begin
      tbl[a] = $urandom_range(0, 31) - 16;
      mem_we = 1; mem_waddr = AA_W'(a); mem_wdata = SCORE_W'(tbl[a]);
      @(negedge clk);
    end
    mem_we = 0; gap_we = 1; mem_wdata = SCORE_W'(gap);
    @(negedge clk);
    gap_we = 0;
    for (int k = 0; k < 3000; k++) begin
      int e_h, e_m, own, ownm, dg;
      mem_raddr = AA_W'($urandom_range(0, 22));
      h_left = score_t'($urandom_range(0, 60)); m_left = score_t'($urandom_range(0, 80));
      h_diag = score_t'($urandom_range(0, 60)); h_own = score_t'($urandom_range(0, 60));
      m_own  = score_t'($urandom_range(0, 80));
      if (k % 50 == 0) h_diag = 9'd505;  // near the top of the score range
      init = ($urandom_range(0, 5) == 0);
      hold = ($urandom_range(0, 7) == 0);
      #1;
      own  = init ? 0 : int'(h_own);
      ownm = init ? 0 : int'(m_own);
      dg   = init ? 0 : int'(h_diag);
      e_h = mx(0, mx(mx(dg + tbl[mem_raddr], int'(h_left) - gap), own - gap));
      if (e_h > 511) e_h = 511;
      e_m = mx(mx(int'(m_left), ownm), e_h);
      if (hold) begin e_h = int'(h_own); e_m = int'(m_own); end
      checks++;
      if (int'(h_new) != e_h || int'(m_new) != e_m) begin
        failures++;
        $display("FAIL k=%0d aa=%0d S=%0d l=%0d d=%0d o=%0d init=%b hold=%b: got %0d/%0d exp %0d/%0d",
                 k, mem_raddr, tbl[mem_raddr], h_left, h_diag, h_own, init, hold, h_new, m_new, e_h, e_m);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
