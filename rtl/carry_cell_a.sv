// Real-carry cell "A" for the low-order bit positions of the Ling adder.
//
// For positions whose pseudo carry H_i is already complete before the last prefix
// level (bits 0 to 3 of the 8-bit adder, 0 to 7 of the 16-bit one) the real carry
// is simply c_i = H_i . p_i. Purely combinational.
module carry_cell_a (
  input  logic h,      // pseudo carry H_i
  input  logic p_bit,  // p_i
  output logic c       // carry out of bit i
);

  assign c = h & p_bit;

endmodule
