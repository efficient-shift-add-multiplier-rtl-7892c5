// Multiplier-bit selector of the modified BZ-FAD multiplier.
//
// Instead of shifting Y right every cycle (or stepping a ring counter and a
// multiplexer) the multiplier stays put in its register and AND gates pick the
// bit for the current cycle: the bit index is decoded to a one-hot vector, ANDed
// with Y and OR-reduced to ybit = Y[idx]. The same one-hot vector addresses the
// product-register bit that is written in that cycle.
//
// Replacing the shift with AND gates follows the published design; driving the
// gates from a binary counter through a decoder is this design's choice.
//
// Interface: y (N bits), idx -> onehot (N bits), ybit. Purely combinational. An
// idx of N or more gives onehot = 0 and ybit = 0.
module ybit_select
  import bzfad_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]              y,
  input  logic [idx_width(N)-1:0]   idx,
  output logic [N-1:0]              onehot,
  output logic                      ybit
);

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      onehot[k] = (idx == k[idx_width(N)-1:0]);
    end
  end

  assign ybit = |(y & onehot);

endmodule
