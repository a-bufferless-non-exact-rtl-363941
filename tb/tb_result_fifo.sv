// tb_result_fifo: random writes and reads on an 8-entry, 16-bit buffer
// against a queue model, including long stretches with the read side
// stalled so that writes are dropped; checks data order, count, the sticky
// overflow flag and the drop counter, and a simultaneous read and write on
// a full buffer (which must not drop).
module tb_result_fifo;
  localparam int WIDTH = 16, DEPTH = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, wr_en, rd_valid, rd_ready, overflow;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [3:0] count;
  logic [31:0] dropped;

  result_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] q [$];
  int drops = 0, full_rw = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_en = 0; rd_ready = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // outputs against the model
      checks++;
      if (rd_valid != (q.size() != 0) || int'(count) != q.size()) begin
        failures++; $display("t=%0d valid %0b count %0d, model %0d", t, rd_valid, count, q.size());
      end
      if (q.size() != 0) begin
        checks++; if (rd_data != q[0]) begin failures++; $display("t=%0d data %h exp %h", t, rd_data, q[0]); end
      end
      checks++;
      if (int'(dropped) != drops || overflow != (drops != 0)) begin failures++; $display("dropped %0d exp %0d", dropped, drops); end
      wr_en    = ($urandom_range(0, 2) != 0);
      wr_data  = 16'($urandom);
      rd_ready = ((t / 200) % 2 == 1) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 9) == 0);
      // model update at the coming edge
      if (wr_en && rd_ready && q.size() == DEPTH) full_rw++;
      if (rd_ready && q.size() != 0) begin
        void'(q.pop_front());
        if (wr_en) q.push_back(wr_data);
      end else if (wr_en) begin
        if (q.size() < DEPTH) q.push_back(wr_data);
        else drops++;
      end
    end
    checks++;
    if (drops == 0 || full_rw == 0) begin failures++; $display("coverage: drops %0d full read+write %0d", drops, full_rw); end
    $display("drops %0d, read+write on full %0d", drops, full_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
