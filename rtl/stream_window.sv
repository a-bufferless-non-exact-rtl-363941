// stream_window: bufferless sliding window over the input bit stream.
//
// Every accepted clock brings W_IN = S * M new stream bits. Stream bit j of
// word k is stream bit k*W_IN + j (least significant bit first). The module
// keeps only the last NWORDS = 1 + ceil((L - S) / W_IN) words, just enough
// to cut M overlapping L-bit windows starting S bits apart: window m covers
// stream bits base_pos + m*S ... base_pos + m*S + L - 1, bit i of the window
// being stream bit base_pos + m*S + i. One word in therefore lets all M
// matching engines advance, which gives the bandwidth S * M * F.
//
// Windows start only on symbol boundaries (multiples of S), and the window
// register is the only storage on the stream path. The LSB-first bit order
// and the choice to start evaluating once NWORDS words are held are this
// design's own. The last windows of a stream, which would need bits that
// have not arrived, are evaluated only when further words come in.
//
// Timing: in_valid/in_data are taken every clock (no back-pressure).
// win_valid pulses for one clock after each accepted word once the window
// register is full; windows and base_pos then hold that word's windows.
module stream_window #(
  parameter int unsigned L     = nem_pkg::L_DEF,
  parameter int unsigned S     = nem_pkg::S_DEF,
  parameter int unsigned M     = nem_pkg::M_DEF,
  parameter int unsigned POS_W = nem_pkg::POS_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [S*M-1:0]          in_data,
  output logic                    win_valid,
  output logic [M-1:0][L-1:0]     windows,
  output logic [POS_W-1:0]        base_pos
);
  localparam int unsigned W_IN   = S * M;
  localparam int unsigned NWORDS = 1 + (L - S + W_IN - 1) / W_IN;
  localparam int unsigned BUF_W  = NWORDS * W_IN;
  localparam int unsigned FW     = $clog2(NWORDS + 1);

  logic [BUF_W-1:0] buf_q;
  logic [FW-1:0]    fill;

  if (NWORDS > 1) begin : g_shift
    always_ff @(posedge clk) if (in_valid) buf_q <= {in_data, buf_q[BUF_W-1:W_IN]};
  end else begin : g_single
    always_ff @(posedge clk) if (in_valid) buf_q <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      base_pos  <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (fill >= FW'(NWORDS - 1));
      if (in_valid) begin
        if (fill == FW'(NWORDS)) base_pos <= base_pos + POS_W'(W_IN);
        else                     fill     <= fill + 1'b1;
      end
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_win
    assign windows[m] = buf_q[m*S +: L];
  end

endmodule
