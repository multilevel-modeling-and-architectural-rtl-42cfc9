// tb_sw_systolic_array: self-checking test of the Smith-Waterman array.
// A 4-PE array with a 3-cycle loop is loaded with a query and a substitution
// table, then every slot of the loop carries its own stream of subject
// sequences (interleaving), with random bubbles inside sequences. Each
// result is compared with a software Smith-Waterman (linear gap, local
// alignment maximum) and its arrival cycle with the expected latency.
module tb_sw_systolic_array;
  import sw_pkg::*;

  localparam int NPE = 4;
  localparam int L   = 3;
  localparam int MAXS = 12;      // longest subject
  localparam int NSEQ = 2 * L;   // two subjects per slot
  localparam int GAP  = 2;

  logic clk = 0, rst_n = 0;
  sw_cfg_t cfg;
  sw_token_t tok;
  logic res_valid;
  logic [ID_W-1:0] res_id;
  score_t res_max;

  int checks = 0, failures = 0;

  sw_systolic_array #(.N_PE(NPE), .LOOP_LEN(L)) dut (
    .clk, .rst_n, .cfg, .tok_in(tok), .res_valid, .res_id, .res_max);

  always #5 clk = ~clk;

  int q [NPE];
  int slen [NSEQ];
  int subj [NSEQ][MAXS];
  int expv [NSEQ];
  int done_cycle [NSEQ];
  int seen [NSEQ];
  int cycle = 0;

  function automatic int sc(int a, int b);
    return (a == b) ? 4 + (a % 4) : ((a * 7 + b * 3) % 7) - 4;
  endfunction

  function automatic int ref_sw(int n);
    int H [NPE+1][MAXS+1];
    int best = 0;
    for (int i = 0; i <= NPE; i++) for (int j = 0; j <= MAXS; j++) H[i][j] = 0;
    for (int i = 1; i <= NPE; i++)
      for (int j = 1; j <= slen[n]; j++) begin
        int v = 0;
        if (H[i-1][j-1] + sc(q[i-1], subj[n][j-1]) > v) v = H[i-1][j-1] + sc(q[i-1], subj[n][j-1]);
        if (H[i-1][j] - GAP > v) v = H[i-1][j] - GAP;
        if (H[i][j-1] - GAP > v) v = H[i][j-1] - GAP;
        H[i][j] = v;
        if (v > best) best = v;
      end
    return best;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && res_valid) begin
    automatic int id = int'(res_id);
    checks++;
    if (id >= NSEQ || res_max != score_t'(expv[id])) begin
      failures++;
      $display("FAIL id=%0d got %0d exp %0d", id, res_max, (id < NSEQ) ? expv[id] : -1);
    end else begin
      seen[id]++;
      // result leaves NPE*L cycles after the last amino acid entered
      checks++;
      if (cycle - done_cycle[id] != NPE * L) begin
        failures++;
        $display("FAIL latency id=%0d %0d", id, cycle - done_cycle[id]);
      end
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos [L];
  int cur [L];
  int bubbles = 0;

  initial begin
    cfg = '0; tok = '0;
    for (int i = 0; i < NPE; i++) q[i] = $urandom_range(0, NUM_AA-1);
    for (int n = 0; n < NSEQ; n++) begin
      slen[n] = $urandom_range(1, MAXS);
      for (int j = 0; j < slen[n]; j++) subj[n][j] = $urandom_range(0, NUM_AA-1);
      // every third subject contains part of the query, to give high scores
      if (n % 3 == 0) for (int j = 0; j < NPE && j < slen[n]; j++) subj[n][j] = q[j];
      expv[n] = ref_sw(n);
      seen[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the query: one score entry per cycle, then the gap of every PE
    for (int k = 0; k < NPE; k++) begin
      for (int a = 0; a < int'(NUM_AA); a++) begin
        @(negedge clk);
        cfg = '{we: 1'b1, pe: PE_ID_W'(k), addr: AA_W'(a), data: SCORE_W'(sc(q[k], a))};
      end
      @(negedge clk);
      cfg = '{we: 1'b1, pe: PE_ID_W'(k), addr: GAP_ADDR, data: SCORE_W'(GAP)};
    end
    @(negedge clk); cfg = '0;
    // wait until the stream is aligned to slot 0
    while (cycle % L != L - 1) @(negedge clk);
    for (int s = 0; s < L; s++) begin pos[s] = 0; cur[s] = s; end
    // feed: slot s carries subjects s and s+L one after the other
    forever begin
      automatic int s;
      @(negedge clk);
      s = (cycle + 1) % L;
      tok = '0;
      if (cur[s] < NSEQ) begin
        if ($urandom_range(0, 4) == 0 && pos[s] > 0) begin
          bubbles++;               // leave a bubble inside the sequence
        end else begin
          automatic int n = cur[s];
          tok.valid = 1'b1;
          tok.first = (pos[s] == 0);
          tok.last  = (pos[s] == slen[n] - 1);
          tok.aa    = AA_W'(subj[n][pos[s]]);
          tok.id    = ID_W'(n);
          if (tok.last) begin
            done_cycle[n] = cycle;
            pos[s] = 0;
            cur[s] += L;
          end else pos[s]++;
        end
      end
      begin
        automatic bit all_done = 1;
        for (int n = 0; n < NSEQ; n++) if (seen[n] == 0) all_done = 0;
        if (all_done) break;
      end
    end
    checks++;
    if (bubbles == 0) begin failures++; $display("FAIL no bubble exercised"); end
    $display("bubbles=%0d", bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
