// tb_emerging_tech_top: end-to-end test of the top level at its default size.
// All designs run at the same time from one clock and reset:
//   * the Smith-Waterman accelerator (8 PEs, 208-cycle loop, 3 lanes) aligns
//     six subjects against a query, with pauses, and every result is compared
//     with a software Smith-Waterman;
//   * the NML ripple-carry adder, example circuit, multiplexer and decoder are fed once per NML
//     clock cycle and compared after their latencies;
//   * the NASIC FIR, Booth multiplier and accumulator are fed once per NASIC
//     cycle and compared with models.
// Each mechanism is counted (interleaved sequences in flight, bubbles, new
// sequences, results, pipelined NML additions with carry out, FIR outputs,
// negative Booth products, accumulator clears, writes and overflows); the test
// fails if any of them never happened.
module tb_emerging_tech_top;
  import sw_pkg::*;

  localparam int NPE = 8, L = 208, LANES = 3;
  localparam int MAXS = 16, PER_LANE = 2, NSEQ = LANES * PER_LANE, GAP = 3;
  localparam int NML_N = 9, NML_LAT = 2 * NML_N;
  localparam int FN = 4, TAPS = 8, ACC_W = 11, FIR_LAT = (3*FN - 2) + (TAPS - 1) * ACC_W;
  localparam int BN = 8, BOOTH_LAT = 2 * ((BN + 1) / 2);
  localparam int AN = 6, SETTLE = AN + 2;

  logic clk = 0, rst_n = 0;
  sw_cfg_t sw_cfg;
  sw_token_t sw_lane_tok [3];
  logic [2:0] sw_lane_ready;
  logic sw_res_valid;
  logic [ID_W-1:0] sw_res_id;
  score_t sw_res_max;
  logic [2:0] nml_ph;
  logic [8:0] nml_a, nml_b, nml_s;
  logic nml_ci, nml_co, nml_ex_out;
  logic [4:0] nml_ex_in;
  logic [8:0] nml_mux_a, nml_mux_b, nml_mux_y;
  logic nml_mux_sel;
  logic [2:0] nml_dec_a;
  logic [7:0] nml_dec_y;
  logic [3:0] nasic_ph;
  logic [3:0] fir_x;
  logic [7:0][3:0] fir_coef;
  logic [10:0] fir_y;
  logic [7:0] booth_a, booth_b;
  logic [15:0] booth_p;
  logic [5:0] acc_a, acc_b, acc_s;
  logic acc_ci, acc_init, acc_w, acc_co;

  emerging_tech_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_overlap = 0, n_bubble = 0, n_seq_start = 0, n_sw_result = 0;
  int n_nml_add = 0, n_nml_carry = 0, n_nml_ex = 0, n_nml_mux = 0, n_nml_dec = 0;
  int n_fir = 0, n_booth_neg = 0, n_acc_init = 0, n_acc_write = 0, n_acc_ovf = 0;
  bit sw_done = 0, nml_done = 0, fir_done = 0, booth_done = 0, acc_done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100 * L) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic nml_boundary();
    do @(negedge clk); while (nml_ph != 3'b001);
  endtask

  task automatic nasic_boundary();
    do @(negedge clk); while (nasic_ph != 4'b0001);
  endtask

  // ---------------------------------------------------------------- SW
  int q [NPE];
  int slen [NSEQ];
  int subj [NSEQ][MAXS];
  int expv [NSEQ];
  int got [NSEQ];
  int in_flight = 0;
  bit go = 0;

  function automatic int sc(int a, int b);
    return (a == b) ? 6 : ((a + b) % 5) - 3;
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

  always @(negedge clk) if (rst_n && sw_res_valid) begin
    automatic int id = int'(sw_res_id);
    checks++;
    if (id >= NSEQ || sw_res_max != score_t'(expv[id])) begin
      failures++; $display("FAIL sw id=%0d got %0d", id, sw_res_max);
    end else begin
      got[id]++;
      n_sw_result++;
    end
    in_flight--;
  end

  for (genvar k = 0; k < LANES; k++) begin : g_src
    initial begin
      int pos, n;
      sw_lane_tok[k] = '0;
      wait (go);
      for (int r = 0; r < PER_LANE; r++) begin
        n = k + LANES * r;
        pos = 0;
        while (pos < slen[n]) begin
          @(negedge clk);
          if (sw_lane_ready[k] && pos > 0 && $urandom_range(0, 4) == 0) begin
            sw_lane_tok[k] = '0;
            n_bubble++;
            continue;
          end
          sw_lane_tok[k].valid = 1'b1;
          sw_lane_tok[k].first = (pos == 0);
          sw_lane_tok[k].last  = (pos == slen[n] - 1);
          sw_lane_tok[k].aa    = AA_W'(subj[n][pos]);
          sw_lane_tok[k].id    = ID_W'(n);
          if (sw_lane_ready[k]) begin
            if (pos == 0) begin
              n_seq_start++;
              in_flight++;
              if (in_flight > 1) n_overlap++;
            end
            pos++;
          end
        end
        @(negedge clk);
        sw_lane_tok[k] = '0;
      end
    end
  end

  initial begin : sw_main
    sw_cfg = '0;
    for (int i = 0; i < NPE; i++) q[i] = $urandom_range(0, NUM_AA-1);
    for (int n = 0; n < NSEQ; n++) begin
      slen[n] = $urandom_range(NPE + 2, MAXS);
      for (int j = 0; j < slen[n]; j++) subj[n][j] = $urandom_range(0, NUM_AA-1);
      if (n % 2 == 0) for (int j = 0; j < NPE; j++) subj[n][j + 1] = q[j];
      expv[n] = ref_sw(n);
      got[n] = 0;
    end
    wait (rst_n);
    @(negedge clk);
    for (int k = 0; k < NPE; k++) begin
      for (int a = 0; a < int'(NUM_AA); a++) begin
        sw_cfg = '{we: 1'b1, pe: PE_ID_W'(k), addr: AA_W'(a), data: SCORE_W'(sc(q[k], a))};
        @(negedge clk);
      end
      sw_cfg = '{we: 1'b1, pe: PE_ID_W'(k), addr: GAP_ADDR, data: SCORE_W'(GAP)};
      @(negedge clk);
    end
    sw_cfg = '0;
    go = 1;
    begin
      bit done;
      do begin
        @(negedge clk);
        done = 1;
        for (int n = 0; n < NSEQ; n++) if (got[n] == 0) done = 0;
      end while (!done);
    end
    sw_done = 1;
  end

  // ---------------------------------------------------------------- NML
  initial begin : nml_main
    logic [NML_N:0] rq [$];
    logic [4:0] eq [$];
    logic [8:0] mq [$];
    logic [2:0] dq [$];
    nml_a = 0; nml_b = 0; nml_ci = 0; nml_ex_in = 0;
    nml_mux_a = 0; nml_mux_b = 0; nml_mux_sel = 0; nml_dec_a = 0;
    wait (rst_n);
    for (int k = 0; k < 200 + NML_LAT; k++) begin
      nml_boundary();
      if (k >= NML_LAT) begin
        logic [NML_N:0] e;
        e = rq.pop_front();
        checks++;
        if ({nml_co, nml_s} != e) begin failures++; $display("FAIL nml rca k=%0d got %h exp %h", k, {nml_co, nml_s}, e); end
        else begin n_nml_add++; if (e[NML_N]) n_nml_carry++; end
      end
      if (k >= 1) begin
        logic [4:0] m;
        m = eq.pop_front();
        checks++;
        if (nml_ex_out != ((m[0] & m[1]) | (m[2] & m[3]) | (m[3] & m[4]) | (m[2] & m[4]))) begin
          failures++; $display("FAIL nml example k=%0d in=%b", k, m);
        end else n_nml_ex++;
        checks += 2;
        if (nml_mux_y != mq.pop_front()) begin failures++; $display("FAIL nml mux k=%0d", k); end
        else n_nml_mux++;
        if (nml_dec_y != 8'(1 << dq.pop_front())) begin failures++; $display("FAIL nml decoder k=%0d", k); end
        else n_nml_dec++;
      end
      nml_a = 9'($urandom); nml_b = 9'($urandom); nml_ci = 1'($urandom);
      nml_ex_in = 5'($urandom);
      rq.push_back({1'b0, nml_a} + {1'b0, nml_b} + 10'(nml_ci));
      eq.push_back(nml_ex_in);
      nml_mux_a = 9'($urandom); nml_mux_b = 9'($urandom); nml_mux_sel = 1'($urandom);
      nml_dec_a = 3'($urandom);
      mq.push_back(nml_mux_sel ? nml_mux_b : nml_mux_a);
      dq.push_back(nml_dec_a);
    end
    nml_done = 1;
  end

  // ---------------------------------------------------------------- NASIC FIR
  initial begin : fir_main
    int hist [TAPS];
    int fq [$];
    fir_x = 0;
    for (int k = 0; k < TAPS; k++) begin fir_coef[k] = 4'($urandom); hist[k] = 0; end
    wait (rst_n);
    for (int n = 0; n < 100 + FIR_LAT; n++) begin
      int e;
      nasic_boundary();
      if (n >= FIR_LAT) begin
        e = fq.pop_front();
        checks++;
        if (int'(fir_y) != e) begin failures++; $display("FAIL fir n=%0d got %0d exp %0d", n, fir_y, e); end
        else n_fir++;
      end
      fir_x = 4'($urandom);
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(fir_x);
      e = 0;
      for (int k = 0; k < TAPS; k++) e += int'(fir_coef[k]) * hist[k];
      fq.push_back(e);
    end
    fir_done = 1;
  end

  // ---------------------------------------------------------------- NASIC Booth
  initial begin : booth_main
    logic signed [15:0] bq [$];
    booth_a = 0; booth_b = 0;
    wait (rst_n);
    for (int k = 0; k < 200 + BOOTH_LAT; k++) begin
      nasic_boundary();
      if (k >= BOOTH_LAT) begin
        logic signed [15:0] e;
        e = bq.pop_front();
        checks++;
        if ($signed(booth_p) != e) begin failures++; $display("FAIL booth k=%0d got %0d exp %0d", k, $signed(booth_p), e); end
        else if (e < 0) n_booth_neg++;
      end
      booth_a = 8'($urandom); booth_b = 8'($urandom);
      bq.push_back(16'($signed(booth_a)) * 16'($signed(booth_b)));
    end
    booth_done = 1;
  end

  // ---------------------------------------------------------------- NASIC accumulator
  initial begin : acc_main
    int model;
    acc_a = 0; acc_b = 0; acc_ci = 0; acc_init = 0; acc_w = 0;
    wait (rst_n);
    for (int rnd = 0; rnd < 2; rnd++) begin
      nasic_boundary(); acc_init = 1;
      nasic_boundary(); acc_init = 0;
      nasic_boundary();
      checks++;
      if (acc_s != 0) begin failures++; $display("FAIL acc clear: %0d", acc_s); end
      else n_acc_init++;
      model = 0;
      for (int k = 0; k < 20; k++) begin
        int sum;
        acc_a = 6'($urandom); acc_b = 6'($urandom); acc_ci = 1'($urandom);
        sum = model + int'(acc_a) + int'(acc_b) + int'(acc_ci);
        repeat (SETTLE - 1) nasic_boundary();
        acc_w = 1;
        nasic_boundary();
        acc_w = 0;
        nasic_boundary();
        checks++;
        if (int'(acc_s) != sum % 64 || acc_co != (sum >= 64)) begin
          failures++; $display("FAIL acc k=%0d got %0d/%0d exp %0d", k, acc_s, acc_co, sum);
        end else begin
          n_acc_write++;
          if (sum >= 64) n_acc_ovf++;
        end
        model = sum % 64;
      end
    end
    acc_done = 1;
  end

  // ---------------------------------------------------------------- end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (sw_done && nml_done && fir_done && booth_done && acc_done);
    @(negedge clk);
    $display("mechanisms: overlap=%0d bubble=%0d seq_start=%0d sw_result=%0d nml_add=%0d nml_carry=%0d nml_ex=%0d nml_mux=%0d nml_dec=%0d",
             n_overlap, n_bubble, n_seq_start, n_sw_result, n_nml_add, n_nml_carry, n_nml_ex, n_nml_mux, n_nml_dec);
    $display("mechanisms: fir=%0d booth_neg=%0d acc_init=%0d acc_write=%0d acc_overflow=%0d",
             n_fir, n_booth_neg, n_acc_init, n_acc_write, n_acc_ovf);
    checks++;
    if (n_overlap == 0 || n_bubble == 0 || n_seq_start == 0 || n_sw_result == 0 ||
        n_nml_add == 0 || n_nml_carry == 0 || n_nml_ex == 0 || n_nml_mux == 0 || n_nml_dec == 0 || n_fir == 0 || n_booth_neg == 0 ||
        n_acc_init == 0 || n_acc_write == 0 || n_acc_ovf == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("cycles=%0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
