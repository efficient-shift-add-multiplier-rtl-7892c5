// Ling adder pre-processing cell.
//
// For one bit position it forms the generate g = a & b, the propagate (transmit)
// p = a | b and the half sum d = a ^ b. The OR form of propagate is what the Ling
// formulation needs, since it relies on g = g & p. Purely combinational.
module ling_pre_cell
  import bzfad_pkg::*;
(
  input  logic a,
  input  logic b,
  output gp_t  gp,  // {g, p}
  output logic d    // half sum
);

  assign gp.g = a & b;
  assign gp.p = a | b;
  assign d    = a ^ b;

endmodule
