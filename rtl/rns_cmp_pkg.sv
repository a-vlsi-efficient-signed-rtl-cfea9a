// rns_cmp_pkg: types shared by the signed RNS magnitude comparator.
//
// The comparator for the moduli set {2^n-1, 2^n, 2^(n+1)-1} reports one of
// three mutually exclusive outcomes. They travel together as cmp_result_t,
// one bit per flag, so exactly one bit of a result is ever set.
package rns_cmp_pkg;

  // Outcome of a signed comparison of X and Y (two's-complement style
  // signed interpretation of the residue numbers, see rns_signed_cmp).
  typedef struct packed {
    logic gt;  // X > Y
    logic eq;  // X = Y
    logic lt;  // X < Y
  } cmp_result_t;

endpackage
