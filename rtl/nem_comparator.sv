// nem_comparator: non-exact comparator of an L-bit window x against an
// L-bit pattern y.
//
// Non-exact build (EXACT = 0): the Hamming distance stage XORs x and y, the
// Hamming weight counter counts the differing bits over C pipeline stages,
// and the threshold checker reports a match when that count is at most the
// run-time error threshold E. E = 0 then gives exact matching.
// Exact build (EXACT = 1): the Hamming weight counter is left out; x == y is
// computed directly and delayed by C registers so that both builds have the
// same latency. hdist then reads 0 on a match and all ones otherwise.
//
// The HD -> HW -> threshold structure and the exact-build shortcut follow the
// original design; "at most E" (rather than "below E") and the equal latency of
// both builds are this design's own choices.
//
// Timing: x and y are sampled every clock; hdist is valid C clocks later and
// match is combinational on hdist and thr (thr is a static configuration
// value, so it is not delayed).
module nem_comparator #(
  parameter int unsigned L     = nem_pkg::L_DEF,
  parameter int unsigned SEG_W = nem_pkg::SEG_W_DEF,
  parameter int unsigned C     = nem_pkg::C_DEF,
  parameter bit          EXACT = 1'b0
) (
  input  logic                    clk,
  input  logic [L-1:0]            x,
  input  logic [L-1:0]            y,
  input  logic [$clog2(L+1)-1:0]  thr,
  output logic                    match,
  output logic [$clog2(L+1)-1:0]  hdist
);
  localparam int unsigned CW = $clog2(L + 1);

  if (!EXACT) begin : g_nonexact
    logic [L-1:0] hd;
    assign hd = x ^ y;                      // Hamming distance vector
    hamming_weight #(.L(L), .SEG_W(SEG_W), .C(C)) u_hw (
      .clk    (clk),
      .din    (hd),
      .weight (hdist)
    );
    assign match = (hdist <= thr);           // threshold checker
  end else begin : g_exact
    logic eq_d [C+1];
    assign eq_d[0] = (x == y);
    for (genvar i = 0; i < C; i++) begin : g_dly
      always_ff @(posedge clk) eq_d[i+1] <= eq_d[i];
    end
    assign match = eq_d[C];
    assign hdist  = eq_d[C] ? '0 : {CW{1'b1}};
  end

endmodule
