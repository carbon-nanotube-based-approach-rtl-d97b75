// Prefix grouping cell, OAI form for inverted inputs.
//
// Takes the greater/equal pairs of group j (more significant) and group i in
// inverted polarity, as produced by aoi_group, and returns the merged pair in
// true polarity:
//   G = ~(gjn & (ejn | gin))     OAI21, equal to g_j | e_j & g_i
//   E = ~(ejn | ein)             NOR2 (the OAI with an empty AND term), e_j & e_i
// Used on the even levels of the prefix tree. The AOI/OAI-only style follows
// the reference; the cell assignment per level is this design's reading.
// Combinational.
module oai_group (
  input  logic gjn,
  input  logic ejn,
  input  logic gin,
  input  logic ein,
  output logic g,
  output logic e
);

  always_comb begin
    g = ~(gjn & (ejn | gin));
    e = ~(ejn | ein);
  end

endmodule
