// Positive ternary inverter (PTI).
//
// Output is logic 0 only for input logic 2, and logic 2 for inputs 0 and 1
// (the y2 column of the ternary inverter truth table). In the CNFET circuit the
// n-type device has the high threshold (10,0 tube) and the p-type the low one
// (19,0 tube), so the output falls only once the input is near Vdd. The unused
// input code 2'b11 is treated as logic 2. Interface: x (trit) in, y (trit,
// always 0 or 2) out. Timing: combinational, zero delay in RTL.
module tpti
  import ternary_pkg::*;
(
  input  trit_t x,
  output trit_t y
);

  always_comb begin
    y = (x >= T2) ? T0 : T2;
  end

endmodule
