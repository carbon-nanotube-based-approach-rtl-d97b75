// Ternary logic types shared by the comparator.
//
// A trit carries one of three logic values, 0, 1 and 2, which stand for the
// voltage levels 0, Vdd/2 and Vdd. In RTL a trit is a 2-bit enumerated value;
// the code 2'b11 never occurs in a valid circuit and the gates below treat it
// like logic 2 (the highest level). Signals that only ever take the levels 0
// and Vdd (the "binary" parts of the comparator: decoder outputs, greater and
// equal signals, prefix network, final NOR) are plain 1-bit logic, with 1
// standing for ternary level 2 and 0 for level 0.
package ternary_pkg;

  typedef enum logic [1:0] {
    T0 = 2'd0,
    T1 = 2'd1,
    T2 = 2'd2
  } trit_t;

  // Binary level (0 or Vdd) expressed as a trit.
  function automatic trit_t level_to_trit(input logic level);
    return level ? T2 : T0;
  endfunction

endpackage
