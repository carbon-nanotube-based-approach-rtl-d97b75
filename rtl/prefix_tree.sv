// Prefix grouping network (stage 3): merges N per-trit greater/equal pairs
// into the greater and equal signals of the whole operand.
//
// Two groups are merged with
//   G[j:i] = g_j + e_j g_i,   E[j:i] = e_j e_i      (j more significant)
// and the merge is repeated in a balanced binary tree until one pair,
// G[N-1:0] and E[N-1:0], is left. Levels alternate between inverting AOI
// cells (odd levels, counted from the leaves) and OAI cells that accept the
// inverted pair (even levels), so no gate needs an inverter behind it. When
// the tree has an odd number of levels (N = 2, 8, ...) the root pair comes out
// inverted and one output inverter per signal restores true polarity; this
// output inverter is a choice of this RTL.
//
// N need not be a power of two: the operand is padded below its least
// significant trit to the next power of two with neutral positions
// (g = 0, e = 1), which change neither result. The padding is also this
// RTL's choice.
//
// Interface: g[N-1:0], e[N-1:0] per-trit pairs, index N-1 most significant;
// gt, eq out. Timing: combinational, log2(N) gate levels, zero delay in RTL.
module prefix_tree #(
  parameter int N = 16
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] e,
  output logic         gt,
  output logic         eq
);

  // Tree size: next power of two at or above N.
  localparam int NP     = (N <= 1) ? 1 : (1 << $clog2(N));
  localparam int LEVELS = $clog2(NP);
  localparam int PAD    = NP - N;

  // Heap-numbered tree nodes: node k has children 2k (less significant) and
  // 2k+1 (more significant); leaves are NP .. 2NP-1, the root is node 1.
  // A node at an odd level above the leaves holds its pair inverted.
  logic [2*NP-1:1] gn;
  logic [2*NP-1:1] en;

  for (genvar p = 0; p < NP; p++) begin : g_leaf
    if (p < PAD) begin : g_pad
      assign gn[NP+p] = 1'b0;
      assign en[NP+p] = 1'b1;
    end else begin : g_trit
      assign gn[NP+p] = g[p-PAD];
      assign en[NP+p] = e[p-PAD];
    end
  end

  for (genvar k = 1; k < NP; k++) begin : g_node
    // Level above the leaves: LEVELS minus the depth of node k.
    localparam int LVL = LEVELS - ($clog2(k + 1) - 1);
    if (LVL % 2 == 1) begin : g_aoi
      aoi_group u_cell (
        .gj(gn[2*k+1]), .ej(en[2*k+1]),
        .gi(gn[2*k]),   .ei(en[2*k]),
        .gn(gn[k]),     .en(en[k])
      );
    end else begin : g_oai
      oai_group u_cell (
        .gjn(gn[2*k+1]), .ejn(en[2*k+1]),
        .gin(gn[2*k]),   .ein(en[2*k]),
        .g(gn[k]),       .e(en[k])
      );
    end
  end

  if (LEVELS % 2 == 1) begin : g_out_inv
    assign gt = ~gn[1];
    assign eq = ~en[1];
  end else begin : g_out_true
    assign gt = gn[1];
    assign eq = en[1];
  end

endmodule
