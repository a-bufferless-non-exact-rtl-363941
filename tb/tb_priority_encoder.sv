// tb_priority_encoder: exhaustive check of the 8-input priority encoder and
// a 5-input one: any = OR of the requests, idx = lowest active index.
module tb_priority_encoder;
  int checks = 0, failures = 0;
  logic [7:0] r8; logic a8; logic [2:0] i8;
  logic [4:0] r5; logic a5; logic [2:0] i5;

  priority_encoder dut8 (.req(r8), .any(a8), .idx(i8));
  priority_encoder #(.N(5)) dut5 (.req(r5), .any(a5), .idx(i5));

  function automatic int lowest(int v, int n);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      r8 = 8'(v); r5 = 5'(v);
      #1;
      checks++; if (a8 != (v != 0)) begin failures++; $display("any8 %0h", v); end
      checks++; if (i8 != 3'(lowest(v, 8))) begin failures++; $display("idx8 %0h got %0d", v, i8); end
      checks++; if (a5 != ((v & 31) != 0)) begin failures++; $display("any5 %0h", v); end
      checks++; if (i5 != 3'(lowest(v & 31, 5))) begin failures++; $display("idx5 %0h got %0d", v, i5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
