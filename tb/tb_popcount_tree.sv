// tb_popcount_tree: checks the pipelined popcount tree in three shapes
// (32 bits / 1 stage, 128 bits / 3 stages, 20 bits / combinational) against
// $countones of the input applied STAGES clocks earlier, with random,
// all-zero and all-one inputs.
module tb_popcount_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0]  d32;  logic [5:0] c32;
  logic [127:0] d128; logic [7:0] c128;
  logic [19:0]  d20;  logic [4:0] c20;

  popcount_tree #(.W(32),  .STAGES(1)) dut32  (.clk(clk), .din(d32),  .count(c32));
  popcount_tree #(.W(128), .STAGES(3)) dut128 (.clk(clk), .din(d128), .count(c128));
  popcount_tree #(.W(20),  .STAGES(0)) dut20  (.clk(clk), .din(d20),  .count(c20));

  int h32 [$], h128 [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d32 = '0; d128 = '0; d20 = '0;
    for (int i = 0; i < 4; i++) begin h32.push_back(0); h128.push_back(0); end
    repeat (4) @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // expected values of inputs applied earlier
      if (t >= 4) begin
        checks++; if (c32  != 6'(h32[$]))   begin failures++; $display("c32 mismatch t=%0d got %0d exp %0d", t, c32, h32[$]); end
        checks++; if (c128 != 8'(h128[$-2]))  begin failures++; $display("c128 mismatch t=%0d got %0d exp %0d", t, c128, h128[$-2]); end
      end
      case (t % 50)
        0:       begin d32 = '0; d128 = '0; d20 = '0; end
        1:       begin d32 = '1; d128 = '1; d20 = '1; end
        default: begin
          d32  = $urandom;
          d128 = {$urandom, $urandom, $urandom, $urandom};
          if (t % 7 == 0) d128 = d128 & {$urandom, $urandom, $urandom, $urandom};
          d20  = 20'($urandom);
        end
      endcase
      h32.push_back($countones(d32));
      h128.push_back($countones(d128));
      #1;
      checks++; if (c20 != 5'($countones(d20))) begin failures++; $display("c20 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
