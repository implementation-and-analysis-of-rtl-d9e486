// wtm_pkg: types and helpers shared by the Wallace tree multiplier.
//
// final_adder_e names the parallel prefix adder used for the last (carry
// propagate) stage of the multiplier: Kogge-Stone or Sklansky, the two
// variants this design offers. gp_t is a generate/propagate pair and
// gp_merge() is the prefix operator both adders are built from:
//   G(i:k) = G(i:j) | P(i:j) & G(j-1:k),   P(i:k) = P(i:j) & P(j-1:k).
// The operator is the same for an XOR propagate (Kogge-Stone) and an OR
// propagate (Sklansky); both give the same carries.
package wtm_pkg;

  typedef enum logic [0:0] {
    KOGGE_STONE = 1'b0,
    SKLANSKY    = 1'b1
  } final_adder_e;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Combine a more significant group (hi) with the adjacent less
  // significant group (lo).
  function automatic gp_t gp_merge(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
