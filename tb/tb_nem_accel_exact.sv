// tb_nem_accel_exact: the accelerator built for exact matching only
// (EXACT = 1: no Hamming weight counters), at reduced sizes: L = 32,
// N = 4, S = 2, M = 4, 16-entry result buffer. Exact copies and one-bit-off
// copies of the patterns are planted in a random stream; only the exact
// copies may be reported, whatever the run-time threshold says, and each
// record must carry the right position, engine mask and pattern. A
// distance of 0 is reported for each matching engine.
module tb_nem_accel_exact;
  localparam int L = 32, N = 4, S = 2, M = 4, DEPTH = 16, POS_W = 48;
  localparam int W = S * M;
  localparam int NWORDS = 1 + (L - S + W - 1) / W;
  localparam int CW = $clog2(L + 1), IW = $clog2(N);
  localparam int NW = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  nem_accel #(.L(L), .N(N), .S(S), .M(M), .FIFO_DEPTH(DEPTH), .EXACT(1'b1)) dut (.*);

  typedef struct { longint pos; logic [M-1:0] mask; int idx [M]; } rec_t;
  rec_t exp_q [$];
  bit sb [];
  logic [L-1:0] pat [N];
  int n_hits = 0, n_near = 0;

  task automatic model_word(int k);
    rec_t r;
    int base;
    base = (k - (NWORDS - 1)) * W;
    r.pos = longint'(base);
    r.mask = '0;
    for (int m = 0; m < M; m++) begin
      logic [L-1:0] w;
      for (int i = 0; i < L; i++) w[i] = sb[base + m * S + i];
      r.idx[m] = 0;
      for (int n = N - 1; n >= 0; n--) begin
        if (w == pat[n]) begin r.mask[m] = 1'b1; r.idx[m] = n; end
        else if ($countones(w ^ pat[n]) == 1) n_near++;
      end
      if (r.mask[m]) n_hits++;
    end
    if (r.mask != '0) exp_q.push_back(r);
  endtask

  always @(negedge clk) if (rst_n) begin
    r_ready = 1'b1;
    if (r_valid) begin
      rec_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected record at %0d", r_pos); end
      else begin
        e = exp_q.pop_front();
        if (longint'(r_pos) != e.pos || r_mask != e.mask) begin
          failures++; $display("pos %0d mask %b, expected %0d %b", r_pos, r_mask, e.pos, e.mask);
        end
        for (int m = 0; m < M; m++) if (e.mask[m]) begin
          checks++;
          if (int'(r_idx[m]) != e.idx[m] || r_hdist[m] != '0) begin failures++; $display("engine %0d pattern %0d", m, r_idx[m]); end
        end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; s_valid = 1'b0; s_data = '0; r_ready = 1'b1;
    cfg_pat_we = 0; cfg_pat_en = 0; cfg_thr_we = 0; cfg_pat_addr = '0; cfg_rd_addr = '0;
    cfg_pat_data = '0; cfg_thr = '0;
    for (int n = 0; n < N; n++) pat[n] = $urandom;
    sb = new[NW * W];
    foreach (sb[i]) sb[i] = 1'($urandom);
    for (int i = 0; i < 150; i++) begin
      int p;
      logic [L-1:0] v;
      p = S * $urandom_range(0, (NW * W - L) / S);
      v = pat[i % N];
      if (i % 2 == 1) v[$urandom_range(L - 1)] ^= 1'b1;
      for (int b = 0; b < L; b++) sb[p + b] = v[b];
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      cfg_pat_we = 1'b1; cfg_pat_addr = IW'(n); cfg_pat_data = pat[n]; cfg_pat_en = 1'b1;
    end
    @(negedge clk);
    cfg_pat_we = 1'b0;
    // a threshold the exact build must ignore
    cfg_thr_we = 1'b1; cfg_thr = CW'(5);
    @(negedge clk) cfg_thr_we = 1'b0;
    for (int k = 0; k < NW; k++) begin
      @(negedge clk);
      s_valid = 1'b1;
      for (int j = 0; j < W; j++) s_data[j] = sb[k * W + j];
      if (k >= NWORDS - 1) model_word(k);
    end
    @(negedge clk) s_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || dropped != 0) begin failures++; $display("%0d records missing, %0d dropped", exp_q.size(), dropped); end
    checks++;
    if (n_hits < 50 || n_near < 50) begin failures++; $display("coverage: exact %0d one-off %0d", n_hits, n_near); end
    $display("exact hits %0d, one-bit-off windows rejected %0d", n_hits, n_near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
