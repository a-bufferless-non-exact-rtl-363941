// tb_matching_engine: checks one matching engine at its defaults (128-bit
// word, 8 patterns, 2 comparator stages). Six patterns are enabled; windows
// are copies of random patterns with 0..20 flipped bits, some equally close
// to two patterns, and random words. The reference picks the lowest-numbered
// enabled pattern within the threshold; outputs are checked C + 1 = 3
// clocks after the window, together with the position and distance.
module tb_matching_engine;
  localparam int L = 128, N = 8, C = 2, POS_W = 48;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, out_valid, out_match;
  logic [L-1:0] window;
  logic [POS_W-1:0] in_pos, out_pos;
  logic [N-1:0][L-1:0] patterns;
  logic [N-1:0] pat_en;
  logic [7:0] thr, out_hdist;
  logic [2:0] out_idx;

  matching_engine dut (.*);

  typedef struct { bit v; bit m; int idx; int hd; longint pos; } exp_t;
  exp_t q [$];
  int n_multi = 0, n_match = 0;

  function automatic exp_t model(logic [L-1:0] w, logic [POS_W-1:0] p, bit v);
    exp_t e; e.v = v; e.m = 0; e.idx = 0; e.hd = 0; e.pos = longint'(p);
    for (int n = N - 1; n >= 0; n--) begin
      int d = $countones(w ^ patterns[n]);
      if (pat_en[n] && d <= int'(thr)) begin e.m = v; e.idx = n; e.hd = d; end
    end
    return e;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    rst_n = 1'b0; in_valid = 1'b0; window = '0; in_pos = '0; thr = 8'd8;
    for (int n = 0; n < N; n++) patterns[n] = {$urandom, $urandom, $urandom, $urandom};
    pat_en = 8'b1011_1101;
    // pattern 5 differs from pattern 2 in 4 bits: both can be within reach
    patterns[5] = patterns[2] ^ 128'hF;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) begin q.push_back('{0, 0, 0, 0, 0}); end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      e = q.pop_front();
      checks++;
      if (out_valid != e.v || out_match != e.m) begin
        failures++; $display("t=%0d valid/match got %0b/%0b exp %0b/%0b", t, out_valid, out_match, e.v, e.m);
      end else if (e.m) begin
        checks++;
        if (int'(out_idx) != e.idx || int'(out_hdist) != e.hd || longint'(out_pos) != e.pos) begin
          failures++; $display("t=%0d idx/hd/pos got %0d/%0d/%0d exp %0d/%0d/%0d", t, out_idx, out_hdist, out_pos, e.idx, e.hd, e.pos);
        end
      end
      if (t % 500 == 250) thr = 8'($urandom_range(0, 12));
      in_valid = ($urandom_range(0, 7) != 0);
      in_pos   = in_pos + 48'd2;
      case ($urandom_range(0, 3))
        0: window = {$urandom, $urandom, $urandom, $urandom};
        default: begin
          window = patterns[$urandom_range(0, N-1)];
          repeat ($urandom_range(0, 20)) window[$urandom_range(L-1)] ^= 1'b1;
        end
      endcase
      e = model(window, in_pos, in_valid);
      if (e.m) n_match++;
      if (e.m && e.idx == 2 && $countones(window ^ patterns[5]) <= int'(thr)) n_multi++;
      q.push_back(e);
    end
    checks++;
    if (n_match < 100 || n_multi < 5) begin failures++; $display("coverage: matches %0d, two-pattern hits %0d", n_match, n_multi); end
    $display("matches %0d, windows within reach of two patterns %0d", n_match, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
