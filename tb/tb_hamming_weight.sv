// tb_hamming_weight: checks the segmented Hamming weight counter at its
// defaults (128 bits, 4 x 32-bit segments, 2 stages) and at 100 bits with a
// padded last segment and 1 stage. The output must equal $countones of the
// input applied C clocks earlier.
module tb_hamming_weight;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] a; logic [7:0] wa;
  logic [99:0]  b; logic [6:0] wb;

  hamming_weight dut_a (.clk(clk), .din(a), .weight(wa));
  hamming_weight #(.L(100), .SEG_W(32), .C(1)) dut_b (.clk(clk), .din(b), .weight(wb));

  int ha [$], hb [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (3) begin ha.push_back(0); hb.push_back(0); end
    repeat (3) @(posedge clk);
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      if (t >= 3) begin
        checks++; if (wa != 8'(ha[$-1])) begin failures++; $display("wa t=%0d got %0d exp %0d", t, wa, ha[$-1]); end
        checks++; if (wb != 7'(hb[$]))   begin failures++; $display("wb t=%0d got %0d exp %0d", t, wb, hb[$]); end
      end
      if (t % 40 == 0)      begin a = '1; b = '1; end
      else if (t % 40 == 1) begin a = '0; b = '0; end
      else begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        // sparse words too: small weights are the interesting ones
        if (t % 3 == 0) begin a = '0; a[$urandom_range(127)] = 1'b1; a[$urandom_range(127)] = 1'b1; end
        if (t % 4 == 0) begin b = '0; b[99] = 1'b1; b[$urandom_range(99)] = 1'b1; end
      end
      ha.push_back($countones(a));
      hb.push_back($countones(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
