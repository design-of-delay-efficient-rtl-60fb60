// ppa_pkg: types and the prefix operator shared by the parallel prefix adders
// and the 16x16 approximate multiplier.
//
// A parallel prefix adder works on (generate, propagate) pairs. For bit i,
// g = a&b and p = a^b. Two adjacent groups combine with the "dot" operator
//   (G, P)_hi:lo = (G_hi | P_hi & G_lo, P_hi & P_lo)
// which is associative, so the group carries of all prefixes can be formed by
// any tree of dot nodes. Brent-Kung and Ladner-Fischer are two such trees.
// The enum selects which tree the 16x16 multiplier uses for its three adders.
package ppa_pkg;

  // Generate/propagate pair of one bit or one group of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Prefix tree used by the adders of the 16x16 multiplier.
  typedef enum logic [0:0] {
    PPA_BKA = 1'b0,  // Brent-Kung
    PPA_LFA = 1'b1   // Ladner-Fischer
  } ppa_kind_e;

  // Dot operator: combine a more significant group (hi) with the group just
  // below it (lo).
  function automatic gp_t dot(input gp_t hi, input gp_t lo);
    dot.g = hi.g | (hi.p & lo.g);
    dot.p = hi.p & lo.p;
  endfunction

endpackage
