// Final stage: lesser signal.
//
// A is less than B exactly when it is neither greater nor equal, so the
// lesser output is a binary NOR of the grouped greater and equal signals:
//   L = ~(G[N-1:0] | E[N-1:0])
// Interface: gt, eq in; lt out (1 = logic 2). Combinational.
module lesser_nor (
  input  logic gt,
  input  logic eq,
  output logic lt
);

  always_comb begin
    lt = ~(gt | eq);
  end

endmodule
