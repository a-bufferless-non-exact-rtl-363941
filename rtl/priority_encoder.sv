// priority_encoder: picks the lowest-numbered active request.
//
// Used in each matching engine to decide from its N comparator match flags
// whether the current window is selected (any) and which pattern it is
// credited to (idx). Lowest index wins; the priority order is this design's
// own choice. Purely combinational; idx is 0 when nothing is active.
module priority_encoder #(
  parameter int unsigned N = nem_pkg::N_DEF
) (
  input  logic [N-1:0]                       req,
  output logic                               any,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        any = 1'b1;
        idx = IW'(i);
      end
    end
  end

endmodule
