// The two proposed modified BZ-FAD multipliers, 8 x 8 and 16 x 16, side by side.
//
// Each instance is a bzfad_mult with its own Ling prefix adder of matching width
// (8-bit and 16-bit) and its own start/busy/done handshake; they share only the
// clock and the asynchronous active-low reset. See bzfad_mult for timing: the
// 8-bit product is ready 9 edges after its start, the 16-bit one 17 edges after.
module bzfad_top #(
  parameter int unsigned N_SMALL = 8,
  parameter int unsigned N_LARGE = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // 8-bit multiplier
  input  logic                 start8,
  input  logic [N_SMALL-1:0]   x8,
  input  logic [N_SMALL-1:0]   y8,
  output logic                 busy8,
  output logic                 done8,
  output logic [2*N_SMALL-1:0] p8,
  // 16-bit multiplier
  input  logic                 start16,
  input  logic [N_LARGE-1:0]   x16,
  input  logic [N_LARGE-1:0]   y16,
  output logic                 busy16,
  output logic                 done16,
  output logic [2*N_LARGE-1:0] p16
);

  bzfad_mult #(.N(N_SMALL)) u_mult8 (
    .clk, .rst_n, .start(start8), .x(x8), .y(y8), .busy(busy8), .done(done8), .product(p8)
  );

  bzfad_mult #(.N(N_LARGE)) u_mult16 (
    .clk, .rst_n, .start(start16), .x(x16), .y(y16), .busy(busy16), .done(done16), .product(p16)
  );

endmodule
