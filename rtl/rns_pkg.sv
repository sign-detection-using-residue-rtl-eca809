// rns_pkg: types and functions shared by the sign detector for the residue
// number system (RNS) moduli set {2^(n+1)-1, 2^n-1, 2^n}.
//
// gp_t is one generate/propagate pair of a parallel-prefix carry network and
// gp_dot() is the associative prefix operator that merges a more significant
// span (hi) with the adjacent less significant span (lo):
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo.
// Carries are formed from these pairs in prefix_tree, rns_comparator and
// rns_carry_corr. Pure combinational helpers, no timing of their own.
package rns_pkg;

  typedef struct packed {
    logic g;  // span generates a carry
    logic p;  // span propagates an incoming carry
  } gp_t;

  function automatic gp_t gp_dot(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
