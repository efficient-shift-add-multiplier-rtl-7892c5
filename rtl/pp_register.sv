// Partial-product register and feedback multiplexer of the modified BZ-FAD multiplier.
//
// A single N-bit register holds the upper part of the running partial product.
// Each processing cycle the multiplexer forms the (N+1)-bit partial product
//   pp = ybit ? {cout, sum} : {0, acc}
// i.e. the adder result when the multiplier bit is 1, or the register's own
// contents fed straight back when it is 0 (no addition of zero). Bit 0 of pp is
// final: it leaves on pp_lsb for the product register. Bits N..1 are stored back,
// which is the one-place shift, done by wiring.
//
// One intermediate register, the zero-bypass multiplexer and the direct hand-off
// of the LSB follow the published design; the register width and the clear and
// reset behaviour are this design's choices.
//
// Interface: clear (synchronous, wins over step), step, ybit, sum/cout from the
// adder; acc is the register, pp_lsb is combinational from the inputs.
module pp_register #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         step,
  input  logic         ybit,
  input  logic [N-1:0] sum,
  input  logic         cout,
  output logic [N-1:0] acc,
  output logic         pp_lsb
);

  logic [N:0] pp;

  assign pp     = ybit ? {cout, sum} : {1'b0, acc};
  assign pp_lsb = pp[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else if (step)  acc <= pp[N:1];
  end

endmodule
