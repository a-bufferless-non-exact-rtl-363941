// tb_nem_comparator: checks the non-exact comparator (default build) and the
// exact build. Windows are patterns with a chosen number of flipped bits;
// after C = 2 clocks hdist must equal that number and match must equal
// (flips <= threshold). The exact build must report match only for equal
// words, with the same 2-clock latency.
module tb_nem_comparator;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] x, y;
  logic [7:0]   thr, hd_n, hd_e;
  logic         m_n, m_e;

  nem_comparator dut_n (.clk(clk), .x(x), .y(y), .thr(thr), .match(m_n), .hdist(hd_n));
  nem_comparator #(.EXACT(1'b1)) dut_e (.clk(clk), .x(x), .y(y), .thr(thr), .match(m_e), .hdist(hd_e));

  int hf [$];

  function automatic logic [127:0] flip(logic [127:0] v, int k);
    // flip k distinct bit positions
    logic [127:0] mask = '0;
    while ($countones(mask) < k) mask[$urandom_range(127)] = 1'b1;
    return v ^ mask;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    x = '0; y = '0; thr = 8'd5;
    repeat (2) hf.push_back(0);
    repeat (3) @(posedge clk);
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        checks++; if (hd_n != 8'(hf[$-1])) begin failures++; $display("hd t=%0d got %0d exp %0d", t, hd_n, hf[$-1]); end
        checks++; if (m_n != (hf[$-1] <= int'(thr))) begin failures++; $display("match t=%0d got %0b flips %0d thr %0d", t, m_n, hf[$-1], thr); end
        checks++; if (m_e != (hf[$-1] == 0)) begin failures++; $display("exact match t=%0d got %0b flips %0d", t, m_e, hf[$-1]); end
        checks++; if (m_e && hd_e != 0) begin failures++; $display("exact hdist not 0"); end
      end
      if (t % 100 == 99) thr = 8'($urandom_range(0, 16)); // threshold changes at run time
      y = {$urandom, $urandom, $urandom, $urandom};
      case ($urandom_range(0, 3))
        0: k = 0;
        1: k = $urandom_range(1, 20);
        2: k = int'(thr) + $urandom_range(0, 1);   // at and just above the threshold
        default: k = $urandom_range(0, 128);
      endcase
      if (k > 128) k = 128;
      x = flip(y, k);
      hf.push_back(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
