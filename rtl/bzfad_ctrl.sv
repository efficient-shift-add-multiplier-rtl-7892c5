// Sequencer of the modified BZ-FAD multiplier.
//
// Two states. In IDLE a start request is accepted: load pulses for one cycle so
// the datapath captures X and Y and clears its registers, and the machine moves
// to RUN with the bit index at 0. In RUN busy is high and one multiplier bit is
// processed per clock; the index counts 0 .. N-1, and after bit N-1 the machine
// returns to IDLE and done pulses for one cycle. A start that arrives while busy
// is ignored.
//
// The one-bit-per-clock schedule follows the published shift-add scheme; the
// handshake (start/load/busy/done), the binary counter and the state encoding are
// this design's choices.
//
// Timing: start sampled at edge 0 -> bits processed at edges 1 .. N -> done high
// in the cycle after edge N (N+1 edges after the start edge).
module bzfad_ctrl
  import bzfad_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    load,
  output logic                    busy,
  output logic [idx_width(N)-1:0] idx,
  output logic                    done
);

  localparam int unsigned IW = idx_width(N);
  localparam logic [IW-1:0] LAST_IDX = IW'(N - 1);

  typedef enum logic {IDLE, RUN} state_t;
  state_t state;

  assign busy = (state == RUN);
  assign load = (state == IDLE) && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= RUN;
          idx   <= '0;
        end
        RUN: if (idx == LAST_IDX) begin
          state <= IDLE;
          done  <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The index never leaves 0 .. N-1 while bits are processed.
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n) busy |-> (idx <= LAST_IDX));
  // done only follows the last bit.
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> ($past(busy) && $past(idx) == LAST_IDX && !busy));

endmodule
