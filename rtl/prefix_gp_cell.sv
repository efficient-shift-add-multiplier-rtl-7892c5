// Group generate/propagate node of the prefix tree.
//
// Applies the associative prefix operator
//   (G, P) o (G', P') = (G + P.G', P.P')
// to a more significant pair (hi) and a less significant pair (lo). In the Ling
// adder the pairs are the intermediate (G*, P*) pairs of one parity chain, so the
// generate output is a partial pseudo carry H. Purely combinational.
module prefix_gp_cell
  import bzfad_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t o
);

  assign o.g = hi.g | (hi.p & lo.g);
  assign o.p = hi.p & lo.p;

endmodule
