// tb_sw_pe: one processing element with a short loop (5 cycles) against a
// cycle model. Random slots (valid, bubble, first amino acid of a sequence)
// and random neighbour scores are applied; the model keeps, per cycle, what
// entered the feedback and diagonal loops and checks that the PE returns
// them exactly LOOP_LEN cycles later and computes every cell from them.
// A configuration write addressed to another PE must not change the table.
module tb_sw_pe;
  import sw_pkg::*;
  localparam int L = 5, ID = 2, T = 4000;
  logic clk = 0, rst_n = 0;
  sw_cfg_t cfg;
  sw_token_t tok_in, tok_out;
  score_t h_in, m_in, h_out, m_out;
  int checks = 0, failures = 0;
  int tbl [23];
  int gap = 3;
  sw_token_t tok_h [T];
  int h_h [T], m_h [T], hin_h [T];

  sw_pe #(.PE_ID(ID), .LOOP_LEN(L)) dut (.clk, .rst_n, .cfg, .tok_in, .h_in, .m_in, .tok_out, .h_out, .m_out);

  always #5 clk = ~clk;

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin : watchdog
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; tok_in = '0; h_in = 0; m_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < 23; a++) begin
      tbl[a] = $urandom_range(0, 15) - 5;
      cfg = '{we: 1'b1, pe: PE_ID_W'(ID), addr: AA_W'(a), data: SCORE_W'(tbl[a])};
      @(negedge clk);
    end
    cfg = '{we: 1'b1, pe: PE_ID_W'(ID), addr: GAP_ADDR, data: SCORE_W'(gap)};
    @(negedge clk);
    cfg = '{we: 1'b1, pe: PE_ID_W'(ID + 1), addr: 5'd0, data: 5'd11};  // another PE
    @(negedge clk);
    cfg = '0;
    // let the loops fill with the zero state of the configuration phase
    repeat (L) @(negedge clk);
    for (int t = 0; t < T; t++) begin
      int own_h, own_m, dg, e_h, e_m;
      sw_token_t e_tok;
      tok_in = sw_token_t'($urandom);
      tok_in.valid = ($urandom_range(0, 4) != 0);
      tok_in.first = ($urandom_range(0, 9) == 0);
      tok_in.aa = AA_W'($urandom_range(0, 22));
      h_in = score_t'($urandom_range(0, 40));
      m_in = score_t'($urandom_range(0, 60));
      // what comes back from the loops (zero before the first pass)
      own_h = t >= L ? h_h[t-L] : 0;
      own_m = t >= L ? m_h[t-L] : 0;
      dg    = t >= L ? hin_h[t-L] : 0;
      e_tok = t >= L ? tok_h[t-L] : '0;
      #1;
      checks++;
      if (tok_out != e_tok || int'(h_out) != own_h || int'(m_out) != own_m) begin
        failures++;
        $display("FAIL t=%0d out tok %h h %0d m %0d, exp %h %0d %0d", t, tok_out, h_out, m_out, e_tok, own_h, own_m);
      end
      if (!tok_in.valid) begin
        e_h = own_h; e_m = own_m;
      end else begin
        if (tok_in.first) begin own_h = 0; own_m = 0; dg = 0; end
        e_h = mx(0, mx(mx(dg + tbl[tok_in.aa], int'(h_in) - gap), own_h - gap));
        e_m = mx(mx(int'(m_in), own_m), e_h);
      end
      tok_h[t] = tok_in; h_h[t] = e_h; m_h[t] = e_m; hin_h[t] = int'(h_in);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
