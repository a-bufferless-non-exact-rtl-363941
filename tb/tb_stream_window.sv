// tb_stream_window: feeds random 16-bit words (S = 2, M = 8, L = 128) with
// random idle clocks and checks, on every win_valid, that window m equals
// stream bits base_pos + 2m ... + 127 of the stream sent so far, that
// base_pos advances by 16 per word, and that exactly one win_valid comes per
// word once the first 9 words have filled the window register.
module tb_stream_window;
  localparam int L = 128, S = 2, M = 8, W = S * M, POS_W = 48;
  localparam int NWORDS = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, win_valid;
  logic [W-1:0] in_data;
  logic [M-1:0][L-1:0] windows;
  logic [POS_W-1:0] base_pos;

  stream_window dut (.*);

  bit stream [$];
  int words = 0, wins = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker on the registered outputs
  always @(negedge clk) if (rst_n && win_valid) begin
    longint b;
    b = longint'(base_pos);
    wins++;
    checks++;
    if (b != longint'(wins - 1) * W) begin failures++; $display("base_pos %0d exp %0d", b, (wins - 1) * W); end
    for (int m = 0; m < M; m++) begin
      logic [L-1:0] ref_w;
      int base_i;
      base_i = int'(b) + m * S;
      for (int i = 0; i < L; i++) ref_w[i] = stream[base_i + i];
      checks++;
      if (windows[m] != ref_w) begin failures++; $display("window %0d at base %0d wrong", m, b); end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_data  = 16'($urandom);
      if (in_valid) begin
        for (int j = 0; j < W; j++) stream.push_back(in_data[j]);
        words++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (wins != words - (NWORDS - 1)) begin failures++; $display("windows %0d for %0d words", wins, words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
