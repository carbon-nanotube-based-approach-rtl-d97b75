// N-trit ternary magnitude comparator.
//
// Compares two unsigned base-3 numbers A and B of N trits each and raises
// exactly one of gt (A > B), eq (A = B) and lt (A < B). Ternary logic is used
// only where the operands enter; everything after the decoders is binary.
// The datapath has four stages:
//   1. a ternary decoder per operand trit (NTI, PTI, NTI and a NOR), giving
//      one-hot lines A_i^k, B_i^k;
//   2. per trit position, greater g_i and equal e_i from two sum-of-products;
//   3. a prefix tree of alternating AOI / OAI cells that merges the pairs,
//      most significant position winning, into G[N-1:0] and E[N-1:0];
//   4. a NOR of G and E giving the lesser signal L.
// Stages 1 and 2 for one position form the one-trit comparator tcmp1.
// The four stages and their equations follow the reference design; which
// end of the operand is most significant, the default width and the
// one-hot result assertion are this design's choices.
//
// Interface: a[N-1:0], b[N-1:0] are packed arrays of trits, index N-1 the
// most significant; gt, eq, lt are binary (1 = logic 2). The default N = 16
// is the widest operand length the reference evaluation uses; any N >= 1
// works. Timing: purely combinational, no clock or reset, zero delay in RTL;
// the gate depth is 3 (decoder) + 2 (greater/equal) + log2(N) (tree) + 1.
module ternary_comparator
  import ternary_pkg::*;
#(
  parameter int N = 16
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  output logic          gt,
  output logic          eq,
  output logic          lt
);

  logic [N-1:0] g, e;

  for (genvar i = 0; i < N; i++) begin : g_pos
    tcmp1 u_cmp (.a(a[i]), .b(b[i]), .g(g[i]), .e(e[i]));
  end

  prefix_tree #(.N(N)) u_tree (.g(g), .e(e), .gt(gt), .eq(eq));

  lesser_nor u_nor (.gt(gt), .eq(eq), .lt(lt));

  // The three results are mutually exclusive and one of them always holds.
  always_comb begin
    assert ({gt, eq, lt} == 3'b100 || {gt, eq, lt} == 3'b010 || {gt, eq, lt} == 3'b001)
      else $error("ternary_comparator: results not one-hot: gt=%b eq=%b lt=%b", gt, eq, lt);
  end

endmodule
