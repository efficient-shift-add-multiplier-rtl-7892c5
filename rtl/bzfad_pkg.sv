// Shared types for the modified BZ-FAD multiplier and its Ling parallel prefix adder.
//
// gp_t is the (generate, propagate) pair that every prefix node passes on. The
// prefix operator on it is  (G, P) o (G', P') = (G | P & G', P & P'), computed by
// prefix_gp_cell; gp_combine gives the same result as a function for reference
// models in testbenches.
package bzfad_pkg;

  typedef struct packed {
    logic g;  // (group) generate
    logic p;  // (group) propagate
  } gp_t;

  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Width of a bit index for an N-bit operand (at least 1).
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
