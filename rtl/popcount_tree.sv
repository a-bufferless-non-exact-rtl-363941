// popcount_tree: pipelined count of the ones in a W-bit vector.
//
// The first level splits the vector into 6-bit groups and counts the ones of
// each group, which maps onto one 6-input LUT per output bit. Every further
// level adds the results of the level below in pairs (an odd one out passes
// through), so the tree has 1 + ceil(log2(ceil(W/6))) levels. STAGES
// pipeline registers are spread evenly over the levels, the last one always
// at the output: register after level k when floor((k+1)*STAGES/LEVELS)
// exceeds floor(k*STAGES/LEVELS). With STAGES = 0 the tree is combinational.
//
// The 6-input first level and the pipelined pairwise adder tree follow the
// comparator structure of the original design; the even spreading of the
// registers is this design's own choice.
//
// Interface: din is sampled every clock (no enable, no valid: the caller
// carries its own valid bit alongside); count shows popcount(din) STAGES
// clocks later. Data registers have no reset.
module popcount_tree #(
  parameter int unsigned W      = nem_pkg::SEG_W_DEF,
  parameter int unsigned STAGES = 1
) (
  input  logic                     clk,
  input  logic [W-1:0]             din,
  output logic [$clog2(W+1)-1:0]   count
);
  localparam int unsigned CW     = $clog2(W + 1);
  localparam int unsigned NLEAF  = (W + 5) / 6;
  localparam int unsigned LV     = (NLEAF > 1) ? $clog2(NLEAF) : 0;
  localparam int unsigned LEVELS = LV + 1;

  initial assert (STAGES <= LEVELS)
    else $error("popcount_tree: STAGES (%0d) exceeds tree levels (%0d)", STAGES, LEVELS);

  // Number of nodes at level k.
  function automatic int unsigned nodes(int unsigned k);
    return (NLEAF + (1 << k) - 1) >> k;
  endfunction

  // Is there a register after level k?
  function automatic bit reg_after(int unsigned k);
    return ((k + 1) * STAGES / LEVELS) != (k * STAGES / LEVELS);
  endfunction

  logic [NLEAF*6-1:0] din_pad;
  assign din_pad = {{(NLEAF*6-W){1'b0}}, din};

  for (genvar k = 0; k < LEVELS; k++) begin : g_lv
    localparam int unsigned NK = nodes(k);
    logic [CW-1:0] sum [NK];   // combinational result of this level
    logic [CW-1:0] node [NK];  // result after the optional register

    if (k == 0) begin : g_leaf
      always_comb begin
        for (int unsigned j = 0; j < NK; j++) begin
          sum[j] = '0;
          for (int unsigned b = 0; b < 6; b++)
            sum[j] = sum[j] + CW'(din_pad[6*j + b]);
        end
      end
    end else begin : g_add
      localparam int unsigned NP = nodes(k - 1);
      always_comb begin
        for (int unsigned j = 0; j < NK; j++) begin
          if (2*j + 1 < NP) sum[j] = g_lv[k-1].node[2*j] + g_lv[k-1].node[2*j+1];
          else              sum[j] = g_lv[k-1].node[2*j];
        end
      end
    end

    if (reg_after(k)) begin : g_reg
      always_ff @(posedge clk) node <= sum;
    end else begin : g_wire
      assign node = sum;
    end
  end

  assign count = g_lv[LEVELS-1].node[0];

endmodule
