// hamming_weight: pipelined Hamming weight (count of ones) of an L-bit word.
//
// The word is cut into ceil(L/SEG_W) segments of SEG_W bits (4 x 32 for the
// default L = 128, the split found to fit 6-input LUT devices best). Each
// segment has its own popcount_tree; the segment counts are then added and
// registered. The segmented organisation follows the original design's Hamming
// weight counter; how the C pipeline stages are shared out is this design's
// own choice: C-1 stages inside the segment trees and one register after the
// final segment sum (C = 0 gives a purely combinational counter).
//
// Interface: din sampled every clock; weight = popcount(din) C clocks later.
module hamming_weight #(
  parameter int unsigned L     = nem_pkg::L_DEF,
  parameter int unsigned SEG_W = nem_pkg::SEG_W_DEF,
  parameter int unsigned C     = nem_pkg::C_DEF
) (
  input  logic                    clk,
  input  logic [L-1:0]            din,
  output logic [$clog2(L+1)-1:0]  weight
);
  localparam int unsigned CW    = $clog2(L + 1);
  localparam int unsigned SW    = (SEG_W < L) ? SEG_W : L;
  localparam int unsigned NSEG  = (L + SW - 1) / SW;
  localparam int unsigned SCW   = $clog2(SW + 1);
  localparam int unsigned TSTG  = (C > 0) ? C - 1 : 0;

  logic [NSEG*SW-1:0] din_pad;
  logic [SCW-1:0]     seg_cnt [NSEG];
  logic [CW-1:0]      total;

  assign din_pad = {{(NSEG*SW-L){1'b0}}, din};

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    popcount_tree #(.W(SW), .STAGES(TSTG)) u_tree (
      .clk   (clk),
      .din   (din_pad[s*SW +: SW]),
      .count (seg_cnt[s])
    );
  end

  always_comb begin
    total = '0;
    for (int unsigned s = 0; s < NSEG; s++) total = total + CW'(seg_cnt[s]);
  end

  if (C > 0) begin : g_out_reg
    always_ff @(posedge clk) weight <= total;
  end else begin : g_out_comb
    assign weight = total;
  end

endmodule
