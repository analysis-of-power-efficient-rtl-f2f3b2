// Gray prefix operator for inverted end-around carry (IEAC) carry units.
//
// The vertical bus v = (G_V, P_V, T_V) holds the state of a column whose low
// part (G_{k:0}, P_{k:0}) has already been combined with inverted high groups;
// the lateral bus lat = (G_L, P_L) is the next high group below those, and it
// enters inverted. The operator computes
//   G_V' = G_V + T_V,   P_V' = P_V & ~G_L,   T_V' = P_V' & ~P_L,   c = G_V' + P_V'
// With T_V tied to 0 and v = (G_{k:0}, P_{k:0}) the lateral output is
// c = G_{k:0} + P_{k:0} & ~G_{n-1:r}; chaining gray operators down a column
// extends the inverted group, and the last c in the column is the IEAC carry
// C_k^+ = G_{k:0} + P_{k:0} & ~G_{n-1:k+1}. Compared with the plain operator it
// costs one extra gate but no extra logic level.
//
// Interface: v (vertical in), lat (lateral in, taken non-inverted here and
// inverted inside), vo (vertical out), c (lateral out). Combinational.
module gray_op
  import modadd_pkg::*;
(
  input  gpt_t v,
  input  gp_t  lat,
  output gpt_t vo,
  output logic c
);

  always_comb begin
    vo.g = v.g | v.t;
    vo.p = v.p & ~lat.g;
    vo.t = vo.p & ~lat.p;
    c    = vo.g | vo.p;
  end

endmodule
