// matching_engine: one matching engine (ME) of the accelerator.
//
// An ME holds N non-exact comparators that all look at the same L-bit window
// of the stream, each against one of the N pre-configured patterns. A
// priority encoder then decides whether the window is selected (match) and
// which pattern it is credited to; the window's stream position travels
// down the pipeline with it and is reported together with the match.
//
// A pattern whose enable bit is clear never matches, so fewer than N
// patterns can be loaded (this design's own choice). The reported distance
// is the Hamming distance to the selected pattern.
//
// Timing: in_valid/window/in_pos are accepted every clock without
// back-pressure (the stream is never buffered). The comparators take C
// clocks and the priority encoder output is registered, so out_* appear
// C + 1 clocks after the window. out_valid marks every evaluated window;
// out_match marks the selected ones. Only the valid pipeline is reset.
module matching_engine #(
  parameter int unsigned L     = nem_pkg::L_DEF,
  parameter int unsigned N     = nem_pkg::N_DEF,
  parameter int unsigned C     = nem_pkg::C_DEF,
  parameter int unsigned SEG_W = nem_pkg::SEG_W_DEF,
  parameter int unsigned POS_W = nem_pkg::POS_W_DEF,
  parameter bit          EXACT = 1'b0
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [L-1:0]                       window,
  input  logic [POS_W-1:0]                   in_pos,
  input  logic [N-1:0][L-1:0]                patterns,
  input  logic [N-1:0]                       pat_en,
  input  logic [$clog2(L+1)-1:0]             thr,
  output logic                               out_valid,
  output logic                               out_match,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] out_idx,
  output logic [$clog2(L+1)-1:0]             out_hdist,
  output logic [POS_W-1:0]                   out_pos
);
  localparam int unsigned CW = $clog2(L + 1);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  cmp_match;
  logic [CW-1:0] cmp_hdist [N];
  logic [N-1:0]  hit;
  logic          pe_any;
  logic [IW-1:0] pe_idx;

  for (genvar n = 0; n < N; n++) begin : g_cmp
    nem_comparator #(.L(L), .SEG_W(SEG_W), .C(C), .EXACT(EXACT)) u_cmp (
      .clk   (clk),
      .x     (window),
      .y     (patterns[n]),
      .thr   (thr),
      .match (cmp_match[n]),
      .hdist (cmp_hdist[n])
    );
  end

  // Valid bit and position follow the comparator pipeline.
  logic             v_d   [C+1];
  logic [POS_W-1:0] pos_d [C+1];
  assign v_d[0]   = in_valid;
  assign pos_d[0] = in_pos;
  for (genvar i = 0; i < C; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_d[i+1] <= 1'b0;
      else        v_d[i+1] <= v_d[i];
    end
    always_ff @(posedge clk) pos_d[i+1] <= pos_d[i];
  end

  // pat_en is a static configuration value and is not delayed.
  assign hit = cmp_match & pat_en;

  priority_encoder #(.N(N)) u_pe (
    .req (hit),
    .any (pe_any),
    .idx (pe_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_match <= 1'b0;
    end else begin
      out_valid <= v_d[C];
      out_match <= v_d[C] & pe_any;
    end
  end

  always_ff @(posedge clk) begin
    out_idx   <= pe_idx;
    out_hdist <= cmp_hdist[pe_idx];
    out_pos   <= pos_d[C];
  end

endmodule
