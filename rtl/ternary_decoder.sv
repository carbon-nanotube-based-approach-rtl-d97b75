// Ternary decoder: one trit in, three one-hot binary lines out.
//
// X_k is high (logic 2) when the input equals k and low otherwise. It is
// built exactly as in the reference schematic from three ternary gates and one
// binary gate:
//   X0 = NTI(x)            high only for x = 0
//   X2 = NTI(PTI(x))       PTI is low only for x = 2, NTI turns that into a high
//   X1 = NOR(X0, X2)       high when neither of the others is
// The NOR is an ordinary binary gate working on the levels 0 and Vdd.
// Interface: x (trit) in; xk[2:0] out with xk[k] = X_k (1 = logic 2).
// Timing: combinational, zero delay in RTL (three gate levels in silicon).
module ternary_decoder
  import ternary_pkg::*;
(
  input  trit_t      x,
  output logic [2:0] xk
);

  trit_t nti_x;   // NTI(x)
  trit_t pti_x;   // PTI(x)
  trit_t nti_px;  // NTI(PTI(x))

  tnti u_nti0 (.x(x),     .y(nti_x));
  tpti u_pti  (.x(x),     .y(pti_x));
  tnti u_nti2 (.x(pti_x), .y(nti_px));

  // NTI and PTI outputs only take the levels 0 and 2.
  logic x0, x2;
  assign x0 = (nti_x  == T2);
  assign x2 = (nti_px == T2);

  always_comb begin
    xk[0] = x0;
    xk[2] = x2;
    xk[1] = ~(x0 | x2);
  end

  // Exactly one output line is high for every input.
  always_comb begin
    assert (xk == 3'b001 || xk == 3'b010 || xk == 3'b100)
      else $error("ternary_decoder: outputs not one-hot: %b", xk);
  end

endmodule
