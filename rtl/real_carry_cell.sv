// Real-carry prefix cell for the upper bit positions of the Ling adder.
//
// Fuses the last prefix level with the conversion from Ling pseudo carry to real
// carry:  c_i = (G + P.G') . p_i,  where (G, P) is the pair of the upper group,
// G' the complete pseudo carry of the lower group and p_i the bit's propagate.
// The product (G + P.G') is H_i; ANDing with p_i gives the ordinary carry out of
// bit i, so each sum bit is then a single XOR. Purely combinational.
module real_carry_cell
  import bzfad_pkg::*;
(
  input  gp_t  hi,     // (G, P) of the upper group
  input  logic g_lo,   // G' of the lower group
  input  logic p_bit,  // p_i
  output logic c       // carry out of bit i
);

  assign c = (hi.g | (hi.p & g_lo)) & p_bit;

endmodule
