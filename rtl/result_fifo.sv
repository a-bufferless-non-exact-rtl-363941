// result_fifo: elastic buffer for match records.
//
// The stream itself is never buffered, but the records of selected windows
// (position, pattern, distance) are stored in this small on-chip buffer
// until the host reads them. Writes cannot be refused because the stream
// cannot be stopped: a write to a full buffer is dropped, counted in
// dropped and flagged by the sticky overflow bit (cleared only by reset).
//
// Storage is a DEPTH-entry array with read and write pointers, which maps to
// block RAM or distributed RAM. Its depth, the drop policy and the
// valid/ready read side are this design's own choices.
//
// Timing: wr_en writes wr_data on the clock edge. The read side is
// first-word-fall-through: rd_valid/rd_data show the oldest entry and it is
// removed on a clock where rd_valid && rd_ready. count is the fill level.
module result_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = nem_pkg::FIFO_DEPTH_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output logic [WIDTH-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  output logic [31:0]                dropped
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd, full;

  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_valid = (count != '0);
  assign do_rd    = rd_valid && rd_ready;
  assign do_wr    = wr_en && (!full || do_rd);
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
      if (wr_en && !do_wr) begin
        overflow <= 1'b1;
        dropped  <= dropped + 1'b1;
      end
    end
  end

  // A read never happens on an empty buffer, a write never overruns it.
  assert property (@(posedge clk) disable iff (!rst_n) do_rd |-> count != '0);
  assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
