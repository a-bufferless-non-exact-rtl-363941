// pattern_store: the run-time configuration of the matcher.
//
// Holds the N L-bit patterns that every matching engine compares against,
// an enable bit per pattern and the error threshold E of the threshold
// checkers. All are written from the host side while the stream runs; the
// new values take effect on the next clock. A read port returns a stored
// pattern for checking the configuration.
//
// The original design only specifies that the patterns are pre-configured and that
// the threshold can be set at run time; the register organisation, the
// write port and the per-pattern enable are this design's own choices.
//
// Reset clears the enables and sets E = 0; pattern bits are not reset.
module pattern_store #(
  parameter int unsigned L = nem_pkg::L_DEF,
  parameter int unsigned N = nem_pkg::N_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // pattern write
  input  logic                               pat_we,
  input  logic [((N > 1) ? $clog2(N) : 1)-1:0] pat_addr,
  input  logic [L-1:0]                       pat_data,
  input  logic                               pat_en_in,
  // threshold write
  input  logic                               thr_we,
  input  logic [$clog2(L+1)-1:0]             thr_in,
  // read back
  input  logic [((N > 1) ? $clog2(N) : 1)-1:0] rd_addr,
  output logic [L-1:0]                       rd_data,
  // to the matching engines
  output logic [N-1:0][L-1:0]                patterns,
  output logic [N-1:0]                       pat_en,
  output logic [$clog2(L+1)-1:0]             thr
);
  always_ff @(posedge clk) begin
    if (pat_we && (32'(pat_addr) < N)) patterns[pat_addr] <= pat_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_en <= '0;
      thr    <= '0;
    end else begin
      if (pat_we && (32'(pat_addr) < N)) pat_en[pat_addr] <= pat_en_in;
      if (thr_we) thr <= thr_in;
    end
  end

  assign rd_data = (32'(rd_addr) < N) ? patterns[rd_addr] : '0;

endmodule
