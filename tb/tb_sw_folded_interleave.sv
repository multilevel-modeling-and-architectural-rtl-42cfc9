// tb_sw_folded_interleave: the Smith-Waterman accelerator with the folded
// (U-shaped) processing element, whose loop is 141 cycles, and full data
// interleaving: 141 lanes, one per loop slot, so 141 subjects are aligned at
// once and a new amino acid enters the array every cycle. Each lane sends one
// subject, sometimes pausing (bubbles). Every result is compared with a
// software Smith-Waterman and its arrival with the latency 1 + 8*141 cycles
// after the last amino acid was taken; the spacing between accepted amino
// acids of one lane must be a multiple of 141 and neighbouring lanes must be
// one slot apart.
module tb_sw_folded_interleave;
  import sw_pkg::*;

  localparam int NPE = 8, L = 141, LANES = 141;
  localparam int MAXS = 24;
  localparam int PER_LANE = 1;
  localparam int NSEQ = LANES * PER_LANE;
  localparam int GAP = 3;

  logic clk = 0, rst_n = 0;
  sw_cfg_t cfg;
  sw_token_t lane_tok [LANES];
  logic [LANES-1:0] lane_ready;
  logic res_valid;
  logic [ID_W-1:0] res_id;
  score_t res_max;
  int checks = 0, failures = 0;
  int cycle = 0;

  sw_accelerator #(.N_PE(NPE), .LOOP_LEN(L), .LANES(LANES)) dut (.clk, .rst_n, .cfg, .lane_tok, .lane_ready, .res_valid, .res_id, .res_max);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int q [NPE];
  int slen [NSEQ];
  int subj [NSEQ][MAXS];
  int expv [NSEQ];
  int last_take [NSEQ];
  int got [NSEQ];
  int bubbles = 0, overlap = 0, in_flight = 0;
  int first_ready [LANES];
  bit go = 0;

  function automatic int sc(int a, int b);
    return (a == b) ? 5 + (a % 3) : ((a + 2 * b) % 6) - 4;
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

  initial begin : watchdog
    repeat (100 * L) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results
  always @(negedge clk) if (rst_n && res_valid) begin
    automatic int id = int'(res_id);
    checks += 2;
    if (id >= NSEQ || res_max != score_t'(expv[id])) begin
      failures++; $display("FAIL id=%0d got %0d", id, res_max);
    end else begin
      got[id]++;
      if (cycle - last_take[id] != 1 + NPE * L) begin
        failures++; $display("FAIL latency id=%0d: %0d", id, cycle - last_take[id]);
      end
    end
    in_flight--;
  end

  // lane sources
  for (genvar k = 0; k < LANES; k++) begin : g_src
    initial begin
      int pos, n, prev_take;
      lane_tok[k] = '0;
      first_ready[k] = -1;
      wait (go);
      prev_take = -1;
      for (int r = 0; r < PER_LANE; r++) begin
        n = k + LANES * r;
        pos = 0;
        while (pos < slen[n]) begin
          @(negedge clk);
          if (lane_ready[k] && first_ready[k] < 0) first_ready[k] = cycle;
          // pause now and then inside a subject: the slot goes by empty
          if (lane_ready[k] && pos > 0 && $urandom_range(0, 5) == 0) begin
            lane_tok[k] = '0;
            bubbles++;
            continue;
          end
          lane_tok[k].valid = 1'b1;
          lane_tok[k].first = (pos == 0);
          lane_tok[k].last  = (pos == slen[n] - 1);
          lane_tok[k].aa    = AA_W'(subj[n][pos]);
          lane_tok[k].id    = ID_W'(n);
          if (lane_ready[k]) begin
            if (prev_take >= 0) begin
              checks++;
              if ((cycle - prev_take) % L != 0) begin
                failures++; $display("FAIL lane %0d spacing %0d", k, cycle - prev_take);
              end
            end
            prev_take = cycle;
            if (pos == 0) begin
              in_flight++;
              if (in_flight > 1) overlap++;
            end
            if (pos == slen[n] - 1) last_take[n] = cycle;
            pos++;
          end
        end
        @(negedge clk);
        lane_tok[k] = '0;
      end
    end
  end

  initial begin
    cfg = '0;
    for (int i = 0; i < NPE; i++) q[i] = $urandom_range(0, NUM_AA-1);
    for (int n = 0; n < NSEQ; n++) begin
      slen[n] = $urandom_range(4, MAXS);
      for (int j = 0; j < slen[n]; j++) subj[n][j] = $urandom_range(0, NUM_AA-1);
      if (n % 2 == 0) for (int j = 0; j < NPE; j++) subj[n][j + 2] = q[j];
      if (n % 2 == 0 && slen[n] < NPE + 2) slen[n] = NPE + 2;
      expv[n] = ref_sw(n);
      got[n] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NPE; k++) begin
      for (int a = 0; a < int'(NUM_AA); a++) begin
        cfg = '{we: 1'b1, pe: PE_ID_W'(k), addr: AA_W'(a), data: SCORE_W'(sc(q[k], a))};
        @(negedge clk);
      end
      cfg = '{we: 1'b1, pe: PE_ID_W'(k), addr: GAP_ADDR, data: SCORE_W'(GAP)};
      @(negedge clk);
    end
    cfg = '0;
    go = 1;   // query loaded: start the lanes
    begin
      bit done;
      do begin
        @(negedge clk);
        done = 1;
        for (int n = 0; n < NSEQ; n++) if (got[n] == 0) done = 0;
      end while (!done);
    end
    // slot offsets of the lanes
    checks++;
    for (int k = 1; k < LANES; k++)
      if ((((first_ready[k] - first_ready[k-1]) % L) + L) % L != 1) begin
        failures++; $display("FAIL slot offset lane %0d: %0d", k, first_ready[k] - first_ready[k-1]);
      end
    checks++;
    if (bubbles == 0) begin failures++; $display("FAIL no bubble"); end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no interleaving"); end
    $display("bubbles=%0d overlap=%0d cycles=%0d", bubbles, overlap, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
