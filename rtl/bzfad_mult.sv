// N x N unsigned shift-add multiplier, modified "Bypass Zero, Feed A Directly"
// (BZ-FAD) organisation, with a Ling parallel prefix adder.
//
// Datapath (one multiplier bit per clock, bit k in processing cycle k):
//   - ybit_select: AND gates pick Y[k] from the held multiplier register; Y is
//     never shifted.
//   - Operand isolation: the adder sees the partial-product register and X only
//     when Y[k] = 1 (both inputs are ANDed with it), so it switches only in cycles
//     that really add.
//   - ling_prefix_adder: acc + X, N bits plus carry.
//   - pp_register: the multiplexer takes {cout, sum} when Y[k] = 1 and feeds the
//     register back unchanged when Y[k] = 0; bit 0 of that partial product is a
//     final product bit, bits N..1 go back into the register.
//   - prod_lsb_reg: stores the final bit directly at position k.
//   After N cycles product = {acc, lower half}.
//
// The organisation above follows the published modified BZ-FAD multiplier. The
// operand registers, the start/busy/done handshake, unsigned operands and the
// asynchronous reset are this design's choices.
//
// Timing: start is accepted when not busy (X and Y sampled at that edge); busy is
// high for N cycles; done pulses in the cycle after the N-th processing edge, i.e.
// N+1 clock edges after the start edge. product is stable from done until the
// next accepted start.
module bzfad_mult
  import bzfad_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);

  logic                    load;
  logic [idx_width(N)-1:0] idx;
  logic [N-1:0]            x_q, y_q;
  logic [N-1:0]            onehot;
  logic                    ybit;
  logic                    add_en;
  logic [N-1:0]            add_a, add_b, sum;
  logic                    cout;
  logic [N-1:0]            acc, lo;
  logic                    pp_lsb;

  bzfad_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .load, .busy, .idx, .done
  );

  // Operand registers, loaded when a start is accepted.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (load) begin
      x_q <= x;
      y_q <= y;
    end
  end

  ybit_select #(.N(N)) u_ysel (.y(y_q), .idx, .onehot, .ybit);

  assign add_en = busy & ybit;
  assign add_a  = acc & {N{add_en}};
  assign add_b  = x_q & {N{add_en}};

  ling_prefix_adder #(.W(N)) u_add (.a(add_a), .b(add_b), .sum, .cout);

  pp_register #(.N(N)) u_pp (
    .clk, .rst_n, .clear(load), .step(busy), .ybit, .sum, .cout, .acc, .pp_lsb
  );

  prod_lsb_reg #(.N(N)) u_lo (
    .clk, .rst_n, .clear(load), .we(busy), .sel(onehot), .d(pp_lsb), .q(lo)
  );

  assign product = {acc, lo};

  // The adder inputs stay quiet in cycles that add nothing.
  a_adder_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    !add_en |-> (add_a == '0 && add_b == '0));

endmodule
