// Negative ternary inverter (NTI).
//
// Output is logic 2 only for input logic 0, and logic 0 for inputs 1 and 2
// (the y0 column of the ternary inverter truth table). In the CNFET circuit it
// is a complementary pair with a low-threshold n-type (19,0) tube and a
// high-threshold p-type (10,0) tube, so it switches low as soon as the input
// rises above about a third of Vdd; at logic level only the truth table
// matters. Interface: x (trit) in, y (trit, always 0 or 2) out.
// Timing: combinational, zero delay in RTL.
module tnti
  import ternary_pkg::*;
(
  input  trit_t x,
  output trit_t y
);

  always_comb begin
    y = (x == T0) ? T2 : T0;
  end

endmodule
