// rns_sign_pkg: types and constants shared by the RNS sign detector.
//
// The detector works on residues of the moduli set {2^(n+1)-1, 2^n-1, 2^n}.
// DEFAULT_N is the word size n used for the reference configuration (n = 16).
// pg_t is a generate/propagate pair and pg_combine() is the prefix operator
// used everywhere a tree of group signals is built:
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo
// For an adder (G, P) are carry generate/propagate; for the comparator they
// are "greater than" / "equal" of a pair of bit fields, and the same operator
// merges a more significant field (hi) with a less significant one (lo).
package rns_sign_pkg;

  localparam int unsigned DEFAULT_N = 16;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  // Identity of pg_combine when used as the less significant operand.
  localparam pg_t PG_IDENTITY = '{g: 1'b0, p: 1'b1};

  function automatic pg_t pg_combine(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
