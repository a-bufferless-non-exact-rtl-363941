// nem_accel: bufferless non-exact pattern matching accelerator (top level).
//
// A raw bit stream arrives S*M bits per clock and is never stored beyond one
// sliding window register (stream_window). From that register M matching
// engines (matching_engine) each take an L-bit window, the windows starting
// S bits apart, so that every symbol-aligned position of the stream is
// examined exactly once. Each engine compares its window with the same N
// patterns in N non-exact comparators (Hamming distance, pipelined Hamming
// weight, threshold E), giving N x M comparisons per clock and a throughput
// of S*M bits per clock. The patterns, their enables and E live in
// pattern_store and may be rewritten while the stream runs.
//
// Whenever at least one engine selects its window, one record is written to
// the result buffer (result_fifo): the stream bit position of engine 0's
// window (engine m's window starts at r_pos + m*S), a mask of the engines
// that matched, and for each engine the selected pattern and its Hamming
// distance. A full buffer drops the record and sets overflow; the stream is
// never stalled.
//
// The engine array, comparator structure and parameters follow the
// original design; the record format, the drop-on-full policy and the host-side
// ports are this design's own.
//
// Timing: one word is taken on every clock with s_valid high; there is no
// ready signal. Once the window register is full (the first NWORDS-1 words
// only fill it), the record of a word taken at clock edge t is readable
// after edge t + C + 2: C comparator stages, the priority-encoder register
// and the buffer write. r_* is a first-word-fall-through valid/ready port.
module nem_accel
  import nem_pkg::*;
#(
  parameter int unsigned L          = L_DEF,
  parameter int unsigned N          = N_DEF,
  parameter int unsigned S          = S_DEF,
  parameter int unsigned M          = M_DEF,
  parameter int unsigned C          = C_DEF,
  parameter int unsigned SEG_W      = SEG_W_DEF,
  parameter int unsigned POS_W      = POS_W_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_DEPTH_DEF,
  parameter bit          EXACT      = 1'b0,
  localparam int unsigned CW = $clog2(L + 1),
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // stream input, S*M bits per clock, LSB first
  input  logic                        s_valid,
  input  logic [S*M-1:0]              s_data,
  // configuration
  input  logic                        cfg_pat_we,
  input  logic [IW-1:0]               cfg_pat_addr,
  input  logic [L-1:0]                cfg_pat_data,
  input  logic                        cfg_pat_en,
  input  logic                        cfg_thr_we,
  input  logic [CW-1:0]               cfg_thr,
  input  logic [IW-1:0]               cfg_rd_addr,
  output logic [L-1:0]                cfg_rd_data,
  // match records
  output logic                        r_valid,
  input  logic                        r_ready,
  output logic [POS_W-1:0]            r_pos,
  output logic [M-1:0]                r_mask,
  output logic [M-1:0][IW-1:0]        r_idx,
  output logic [M-1:0][CW-1:0]        r_hdist,
  // status
  output logic [$clog2(FIFO_DEPTH+1)-1:0] r_count,
  output logic                        overflow,
  output logic [31:0]                 dropped,
  output logic [31:0]                 match_count
);
  localparam int unsigned REC_W = POS_W + M + M*IW + M*CW;

  logic                  win_valid;
  logic [M-1:0][L-1:0]   windows;
  logic [POS_W-1:0]      base_pos;
  logic [N-1:0][L-1:0]   patterns;
  logic [N-1:0]          pat_en;
  logic [CW-1:0]         thr;

  logic [M-1:0]          me_valid, me_match;
  logic [M-1:0][IW-1:0]  me_idx;
  logic [M-1:0][CW-1:0]  me_hdist;
  logic [POS_W-1:0]      me_pos [M];

  logic                  rec_we;
  logic [REC_W-1:0]      rec_in, rec_out;

  stream_window #(.L(L), .S(S), .M(M), .POS_W(POS_W)) u_win (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s_valid),
    .in_data   (s_data),
    .win_valid (win_valid),
    .windows   (windows),
    .base_pos  (base_pos)
  );

  pattern_store #(.L(L), .N(N)) u_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .pat_we    (cfg_pat_we),
    .pat_addr  (cfg_pat_addr),
    .pat_data  (cfg_pat_data),
    .pat_en_in (cfg_pat_en),
    .thr_we    (cfg_thr_we),
    .thr_in    (cfg_thr),
    .rd_addr   (cfg_rd_addr),
    .rd_data   (cfg_rd_data),
    .patterns  (patterns),
    .pat_en    (pat_en),
    .thr       (thr)
  );

  for (genvar m = 0; m < M; m++) begin : g_me
    matching_engine #(
      .L(L), .N(N), .C(C), .SEG_W(SEG_W), .POS_W(POS_W), .EXACT(EXACT)
    ) u_me (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (win_valid),
      .window    (windows[m]),
      .in_pos    (base_pos + POS_W'(m * S)),
      .patterns  (patterns),
      .pat_en    (pat_en),
      .thr       (thr),
      .out_valid (me_valid[m]),
      .out_match (me_match[m]),
      .out_idx   (me_idx[m]),
      .out_hdist (me_hdist[m]),
      .out_pos   (me_pos[m])
    );
  end

  // All engines run in lock step; engine 0's position is the record's base.
  assign rec_we = me_valid[0] && (|me_match);
  assign rec_in = {me_pos[0], me_match, me_idx, me_hdist};

  result_fifo #(.WIDTH(REC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (rec_we),
    .wr_data  (rec_in),
    .rd_valid (r_valid),
    .rd_ready (r_ready),
    .rd_data  (rec_out),
    .count    (r_count),
    .overflow (overflow),
    .dropped  (dropped)
  );

  assign {r_pos, r_mask, r_idx, r_hdist} = rec_out;

  // Number of selected windows (engines with a match), saturating.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match_count <= '0;
    else if (me_valid[0] && match_count != '1)
      match_count <= match_count + 32'($countones(me_match));
  end

  // The engines never fall out of step.
  for (genvar m = 1; m < M; m++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      me_valid[m] == me_valid[0] && (!me_valid[0] || me_pos[m] == me_pos[0] + POS_W'(m * S)));
  end

endmodule
