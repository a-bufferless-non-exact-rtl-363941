// tb_pattern_store: checks reset values (enables clear, threshold 0),
// pattern writes and read-back, enable bits, threshold writes, that a write
// to an address at or beyond N (here N = 6 with a 3-bit address) changes
// nothing, and that writes take effect on the next clock.
module tb_pattern_store;
  localparam int L = 128, N = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, pat_we, pat_en_in, thr_we;
  logic [2:0] pat_addr, rd_addr;
  logic [L-1:0] pat_data, rd_data;
  logic [7:0] thr_in, thr;
  logic [N-1:0][L-1:0] patterns;
  logic [N-1:0] pat_en;

  pattern_store #(.L(L), .N(N)) dut (.*);

  logic [L-1:0] ref_p [N];
  logic [N-1:0] ref_en;
  logic [7:0]   ref_thr;

  task automatic check_all();
    checks++; if (pat_en != ref_en) begin failures++; $display("pat_en %b exp %b", pat_en, ref_en); end
    checks++; if (thr != ref_thr) begin failures++; $display("thr %0d exp %0d", thr, ref_thr); end
    for (int n = 0; n < N; n++) if (ref_en[n]) begin
      checks++; if (patterns[n] != ref_p[n]) begin failures++; $display("pattern %0d wrong", n); end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pat_we = 0; thr_we = 0; pat_en_in = 0; pat_addr = 0; rd_addr = 0;
    pat_data = '0; thr_in = '0;
    ref_en = '0; ref_thr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check_all();
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      pat_we   = $urandom_range(0, 1);
      pat_addr = 3'($urandom);
      pat_data = {$urandom, $urandom, $urandom, $urandom};
      pat_en_in = ($urandom_range(0, 3) != 0);
      thr_we   = ($urandom_range(0, 3) == 0);
      thr_in   = 8'($urandom);
      rd_addr  = 3'($urandom_range(0, N-1));
      #1;
      // nothing visible before the clock edge
      check_all();
      @(posedge clk);
      if (pat_we && pat_addr < N) begin ref_p[pat_addr] = pat_data; ref_en[pat_addr] = pat_en_in; end
      if (thr_we) ref_thr = thr_in;
      #1;
      check_all();
      if (ref_en[rd_addr]) begin
        checks++; if (rd_data != ref_p[rd_addr]) begin failures++; $display("read back %0d wrong", rd_addr); end
      end
    end
    @(negedge clk) pat_we = 0; thr_we = 0; rst_n = 1'b0;
    #1 ref_en = '0; ref_thr = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
