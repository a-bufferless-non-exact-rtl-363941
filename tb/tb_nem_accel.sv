// tb_nem_accel: end-to-end test of the accelerator at its default sizes
// (L = 128, N = 8, S = 2, M = 8, C = 2, 256-entry result buffer).
//
// A 1500-word (24,000-bit) stream is generated up front: random bits with
// copies of the patterns planted at symbol-aligned positions, each with
// 0..14 flipped bits, and a run of a period-2 pattern that several engines
// match in the same clock. Pattern 4 lies 2 bits from pattern 1, so windows
// near both exercise the priority encoder; pattern 6 is planted but
// disabled. The stream is sent in three parts:
//   1. threshold 6, with idle clocks in the stream and a result reader that
//      is often not ready;
//   2. threshold 12 and a new pattern 3, written while the stream is idle;
//   3. threshold 128 (every window matches) with the reader stopped, 300
//      back-to-back words: one record per clock, the first 256 kept and 44
//      dropped with the overflow flag set.
// A reference model computes, for every word, the M windows, their Hamming
// distances to the enabled patterns, the selected pattern of each engine and
// the record, and every record read out is compared with it. The test also
// checks the latency (readable C + 2 clocks after the word is taken), the
// one-record-per-clock rate of part 3, and counts each mechanism: exact and
// non-exact hits, several engines in one record, two patterns within reach,
// disabled-pattern hits, stream gaps, reader stalls, threshold change and
// dropped records; one that never occurs counts as a failure.
module tb_nem_accel;
  import nem_pkg::*;
  localparam int L = L_DEF, N = N_DEF, S = S_DEF, M = M_DEF, C = C_DEF;
  localparam int POS_W = POS_W_DEF, DEPTH = FIFO_DEPTH_DEF;
  localparam int W = S * M;
  localparam int NWORDS = 1 + (L - S + W - 1) / W;
  localparam int CW = $clog2(L + 1), IW = $clog2(N);
  localparam int P1_END = 600, P2_END = 1200, P3_END = 1500;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic rst_n, s_valid;
  logic [W-1:0] s_data;
  logic cfg_pat_we, cfg_pat_en, cfg_thr_we;
  logic [IW-1:0] cfg_pat_addr, cfg_rd_addr;
  logic [L-1:0] cfg_pat_data, cfg_rd_data;
  logic [CW-1:0] cfg_thr;
  logic r_valid, r_ready, overflow;
  logic [POS_W-1:0] r_pos;
  logic [M-1:0] r_mask;
  logic [M-1:0][IW-1:0] r_idx;
  logic [M-1:0][CW-1:0] r_hdist;
  logic [$clog2(DEPTH+1)-1:0] r_count;
  logic [31:0] dropped, match_count;

  nem_accel dut (.*);

  // ---------------- reference model ----------------
  typedef struct { longint pos; logic [M-1:0] mask; int idx [M]; int hd [M]; } rec_t;
  rec_t exp_q [$];
  bit sb [];
  logic [L-1:0] pat [N];
  logic [N-1:0] en;
  int thr;
  int exp_drop = 0, exp_matches = 0;
  // mechanism counters
  int n_exact = 0, n_nonexact = 0, n_multi = 0, n_conflict = 0, n_disabled = 0;
  int n_gap = 0, n_stall = 0, n_thr_change = 0;

  function automatic logic [L-1:0] win_at(int p);
    logic [L-1:0] w;
    for (int i = 0; i < L; i++) w[i] = sb[p + i];
    return w;
  endfunction

  // Expected record for the word with global index k (k >= NWORDS-1).
  task automatic model_word(int k, bit keep);
    rec_t r;
    int base, n_in_reach;
    base = (k - (NWORDS - 1)) * W;
    r.pos = longint'(base);
    r.mask = '0;
    for (int m = 0; m < M; m++) begin
      logic [L-1:0] w;
      w = win_at(base + m * S);
      r.idx[m] = 0; r.hd[m] = 0; n_in_reach = 0;
      for (int n = N - 1; n >= 0; n--) begin
        int d;
        d = $countones(w ^ pat[n]);
        if (d <= thr) begin
          if (en[n]) begin r.mask[m] = 1'b1; r.idx[m] = n; r.hd[m] = d; n_in_reach++; end
          else if (thr < L) n_disabled++;
        end
      end
      if (n_in_reach > 1 && thr < L) n_conflict++;
      if (r.mask[m]) begin
        exp_matches++;
        if (r.hd[m] == 0) n_exact++; else n_nonexact++;
      end
    end
    if (r.mask != '0) begin
      if ($countones(r.mask) > 1) n_multi++;
      if (keep) exp_q.push_back(r);
      else exp_drop++;
    end
  endtask

  // ---------------- result reader ----------------
  int rd_mode = 0;   // 0: ready 70 % of clocks, 1: never ready, 2: always ready
  int n_read = 0;
  always @(negedge clk) if (rst_n) begin
    // r_ready chosen here is sampled by the coming edge; the record shown
    // now is the one that edge removes.
    case (rd_mode)
      0: r_ready = ($urandom_range(0, 9) < 7);
      1: r_ready = 1'b0;
      default: r_ready = 1'b1;
    endcase
    if (r_valid && r_ready) begin
      rec_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected record at %0d", r_pos);
      end else begin
        e = exp_q.pop_front();
        n_read++;
        if (longint'(r_pos) != e.pos || r_mask != e.mask) begin
          failures++; $display("record pos %0d mask %b, expected pos %0d mask %b", r_pos, r_mask, e.pos, e.mask);
        end else begin
          for (int m = 0; m < M; m++) if (e.mask[m]) begin
            checks++;
            if (int'(r_idx[m]) != e.idx[m] || int'(r_hdist[m]) != e.hd[m]) begin
              failures++; $display("pos %0d engine %0d: pattern %0d dist %0d, expected %0d %0d",
                                   e.pos, m, r_idx[m], r_hdist[m], e.idx[m], e.hd[m]);
            end
          end
        end
      end
    end
    if (r_valid && !r_ready) n_stall++;
  end

  // ---------------- stimulus ----------------
  task automatic idle(int n);
    repeat (n) begin @(negedge clk); s_valid = 1'b0; end
  endtask

  task automatic write_pat(int a, logic [L-1:0] d, bit e);
    @(negedge clk);
    s_valid = 1'b0;
    cfg_pat_we = 1'b1; cfg_pat_addr = IW'(a); cfg_pat_data = d; cfg_pat_en = e;
    @(negedge clk);
    cfg_pat_we = 1'b0;
    pat[a] = d; en[a] = e;
    cfg_rd_addr = IW'(a);
    #1;
    checks++; if (cfg_rd_data != d) begin failures++; $display("read back of pattern %0d wrong", a); end
  endtask

  task automatic write_thr(int t);
    @(negedge clk);
    s_valid = 1'b0;
    cfg_thr_we = 1'b1; cfg_thr = CW'(t);
    @(negedge clk);
    cfg_thr_we = 1'b0;
    thr = t;
  endtask

  task automatic plant(logic [L-1:0] p, int lo_word, int hi_word, int flips);
    int pos;
    logic [L-1:0] v;
    pos = S * $urandom_range(lo_word * W / S, (hi_word * W - L) / S);
    v = p;
    repeat (flips) v[$urandom_range(L - 1)] ^= 1'b1;
    for (int i = 0; i < L; i++) sb[pos + i] = v[i];
  endtask

  task automatic send_words(int k0, int k1, bit gaps, bit keep);
    for (int k = k0; k < k1; k++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 9) == 0) begin
        s_valid = 1'b0; n_gap++;
        @(negedge clk);
      end
      s_valid = 1'b1;
      for (int j = 0; j < W; j++) s_data[j] = sb[k * W + j];
      if (k >= NWORDS - 1) model_word(k, keep && (exp_q.size() < DEPTH));
    end
    @(negedge clk) s_valid = 1'b0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] p3_new;
    longint t_acc, t_first;
    int total, inc_cycles, last_total;

    rst_n = 1'b0; s_valid = 1'b0; s_data = '0; r_ready = 1'b0;
    cfg_pat_we = 0; cfg_pat_en = 0; cfg_thr_we = 0; cfg_pat_addr = '0; cfg_rd_addr = '0;
    cfg_pat_data = '0; cfg_thr = '0;

    // patterns and stream
    for (int n = 0; n < N; n++) pat[n] = {$urandom, $urandom, $urandom, $urandom};
    pat[4] = pat[1] ^ 128'h11;
    pat[7] = {64{2'b01}};
    p3_new = {$urandom, $urandom, $urandom, $urandom};
    sb = new[P3_END * W];
    foreach (sb[i]) sb[i] = 1'($urandom);
    for (int i = 0; i < 60; i++) plant(pat[i % 7], 0, P1_END, (i % 3 == 0) ? 0 : $urandom_range(1, 10));
    for (int i = 0; i < 60; i++) plant((i % 4 == 3) ? p3_new : pat[i % 7], P1_END, P2_END, (i % 3 == 0) ? 0 : $urandom_range(1, 14));
    for (int i = 0; i < 400; i++) sb[300 * W + i] = (i % 2 == 0);   // period-2 run

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++; if (r_valid || overflow || dropped != 0) begin failures++; $display("reset state wrong"); end

    // ---- part 1
    en = '0;
    for (int n = 0; n < N; n++) write_pat(n, pat[n], n != 6);
    write_thr(6);
    rd_mode = 0;
    send_words(0, P1_END, 1'b1, 1'b1);

    // ---- part 2: new threshold and pattern while the stream is idle
    idle(C + 4);
    write_thr(12); n_thr_change++;
    write_pat(3, p3_new, 1'b1);
    send_words(P1_END, P2_END, 1'b1, 1'b1);

    // drain
    rd_mode = 2;
    idle(C + 4);
    while (r_valid) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || dropped != 0) begin failures++; $display("after part 2: %0d records missing, %0d dropped", exp_q.size(), dropped); end
    checks++;
    if (int'(match_count) != exp_matches) begin failures++; $display("match_count %0d expected %0d", match_count, exp_matches); end

    // ---- part 3: overflow at full rate
    rd_mode = 1;
    write_thr(L); n_thr_change++;
    idle(2);
    fork
      send_words(P2_END, P3_END, 1'b0, 1'b1);
      begin
        // send_words drives the first word at the next falling edge and the
        // accelerator takes it at the rising edge after that
        @(negedge clk);
        @(posedge clk);
        #1 t_acc = cyc;
        while (!r_valid) @(negedge clk);
        t_first = cyc;
        checks++;
        if (t_first - t_acc != C + 2) begin failures++; $display("latency %0d clocks, expected %0d", t_first - t_acc, C + 2); end
        // one record per clock while the 300 words pass
        inc_cycles = 0; last_total = 1;
        repeat (P3_END - P2_END - 1) begin
          @(negedge clk);
          total = int'(r_count) + int'(dropped);
          if (total == last_total + 1) inc_cycles++;
          last_total = total;
        end
        checks++;
        if (inc_cycles != P3_END - P2_END - 1) begin failures++; $display("rate: %0d of %0d clocks wrote a record", inc_cycles, P3_END - P2_END - 1); end
      end
    join
    idle(C + 4);
    checks++;
    if (!overflow || int'(dropped) != exp_drop || int'(r_count) != DEPTH) begin
      failures++; $display("overflow %0b dropped %0d (expected %0d) count %0d", overflow, dropped, exp_drop, r_count);
    end
    rd_mode = 2;
    while (r_valid) @(negedge clk);
    idle(2);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d records never read", exp_q.size()); end

    // ---- mechanism coverage
    $display("records read %0d; exact hits %0d, non-exact hits %0d, multi-engine records %0d, two patterns in reach %0d",
             n_read, n_exact, n_nonexact, n_multi, n_conflict);
    $display("disabled-pattern hits %0d, stream gaps %0d, reader stalls %0d, threshold changes %0d, dropped %0d",
             n_disabled, n_gap, n_stall, n_thr_change, dropped);
    foreach (checks_cov[i]) begin
      checks++;
      if (checks_cov[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int checks_cov [9];
  always_comb begin
    checks_cov[0] = n_exact;    checks_cov[1] = n_nonexact; checks_cov[2] = n_multi;
    checks_cov[3] = n_conflict; checks_cov[4] = n_disabled; checks_cov[5] = n_gap;
    checks_cov[6] = n_stall;    checks_cov[7] = n_thr_change; checks_cov[8] = exp_drop;
  end
endmodule
