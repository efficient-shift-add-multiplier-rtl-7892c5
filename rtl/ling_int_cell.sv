// Ling intermediate generate/propagate cell.
//
// At bit i the prefix tree starts from the pair (G*_i, P*_{i-1}) with
//   G*_i     = g_i + g_{i-1}
//   P*_{i-1} = p_{i-1} . p_{i-2}
// Pairing two neighbouring generates is what lets a Ling pseudo carry H_i be built
// with one logic level less than the ordinary carry. Bits below 0 are tied to 0
// by the instantiating adder. Purely combinational.
module ling_int_cell
  import bzfad_pkg::*;
(
  input  logic g_hi,  // g_i
  input  logic g_lo,  // g_{i-1}
  input  logic p_hi,  // p_{i-1}
  input  logic p_lo,  // p_{i-2}
  output gp_t  gp     // (G*_i, P*_{i-1})
);

  assign gp.g = g_hi | g_lo;
  assign gp.p = p_hi & p_lo;

endmodule
