// One-trit ternary comparator: stages 1 and 2 of the comparator for one
// operand position.
//
// Each operand trit goes through a ternary decoder; the two one-hot results
// feed the greater/equal generator. g is high when A_i > B_i, e when
// A_i = B_i; A_i < B_i is the case where both are low. This is the cell the
// multi-trit comparator repeats once per trit position.
// Interface: a, b (trits) in; g, e out (1 = logic 2).
// Timing: combinational, zero delay in RTL.
module tcmp1
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output logic  g,
  output logic  e
);

  logic [2:0] ak, bk;

  ternary_decoder u_dec_a (.x(a), .xk(ak));
  ternary_decoder u_dec_b (.x(b), .xk(bk));
  ge_gen          u_ge    (.ak(ak), .bk(bk), .g(g), .e(e));

endmodule
