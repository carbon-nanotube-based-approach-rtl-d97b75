// Initial greater / equal generation for one trit position.
//
// From the decoded operands (A_i^k and B_i^k, one-hot) it forms
//   g_i = A^1 B^0 + A^2 B^0 + A^2 B^1          (A_i > B_i)
//   e_i = A^0 B^0 + A^1 B^1 + A^2 B^2          (A_i = B_i)
// which are the sum-of-products read off the Karnaugh maps of the one-trit
// comparator. In the CNFET circuit each is a binary transistor-level gate
// built from (19,0) tubes; in RTL each is the plain two-level AND-OR above.
// Interface: ak[2:0], bk[2:0] decoder outputs of A_i and B_i; g, e out
// (1 = logic 2). Timing: combinational, zero delay in RTL.
module ge_gen (
  input  logic [2:0] ak,
  input  logic [2:0] bk,
  output logic       g,
  output logic       e
);

  always_comb begin
    g = (ak[1] & bk[0]) | (ak[2] & bk[0]) | (ak[2] & bk[1]);
    e = (ak[0] & bk[0]) | (ak[1] & bk[1]) | (ak[2] & bk[2]);
  end

endmodule
