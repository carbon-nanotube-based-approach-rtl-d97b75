// Prefix grouping cell, inverting (AOI) form.
//
// Merges the greater/equal pair of a more significant group j with that of a
// less significant group i, both given in true polarity, and returns the
// merged pair inverted:
//   G_n = ~(g_j | e_j & g_i)     AOI21
//   E_n = ~(e_j & e_i)           NAND2 (the AOI with an empty OR term)
// Used on the odd levels of the prefix tree, so that no separate inverter is
// needed after each gate. The AOI/OAI-only style follows the reference; the
// exact cell assignment per level is this design's reading. Combinational.
module aoi_group (
  input  logic gj,
  input  logic ej,
  input  logic gi,
  input  logic ei,
  output logic gn,
  output logic en
);

  always_comb begin
    gn = ~(gj | (ej & gi));
    en = ~(ej & ei);
  end

endmodule
