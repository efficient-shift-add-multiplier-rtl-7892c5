// Lower half of the product register of the modified BZ-FAD multiplier.
//
// In processing cycle k the LSB of the new partial product is already a final
// product bit, so it is written straight into bit k, chosen by the one-hot select
// of ybit_select. Nothing in this register ever shifts, and only the addressed
// flip-flop is enabled, which keeps switching low.
//
// Writing each LSB to its own position follows the published design; flip-flops
// (rather than latches) with individual enables are this design's choice.
//
// Interface: clear zeroes all bits (synchronous, wins over we); when we is high,
// q[k] <= d for the bit k with sel[k] = 1. sel is expected to be one-hot or zero.
module prod_lsb_reg #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         we,
  input  logic [N-1:0] sel,
  input  logic         d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (clear) begin
      q <= '0;
    end else if (we) begin
      for (int unsigned k = 0; k < N; k++) begin
        if (sel[k]) q[k] <= d;
      end
    end
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) we |-> $onehot0(sel));

endmodule
