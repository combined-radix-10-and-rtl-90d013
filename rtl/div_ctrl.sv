// div_ctrl: sequencer of the dual-radix divider.
//
// IDLE: waits for `start`; on it, pulses `load` (operands, divisor
//       multiples and selection constants are captured, the residual is
//       set to w[0] = x/r^2) and moves to ITER.
// ITER: `step` is high for NIT_DEC (radix 10) or NIT_BIN (radix 16) cycles,
//       one quotient digit per cycle.
// ROUND: one cycle in which `finish` is high and the converted quotient is
//       corrected, normalized, rounded and registered.
// `done` is a one-cycle pulse in the cycle after ROUND; `busy` is high from
// the cycle after `start` until then. A `start` while busy is ignored.
// Latency from the sampling edge of `start` to `done`: NIT + 1 cycles
// (20 in radix 10, 17 in radix 16 at the default sizes).
// Active-low synchronous reset. The state encoding is this design's choice.
module div_ctrl #(
  parameter int unsigned NIT_DEC = div_pkg::NIT_DEC,
  parameter int unsigned NIT_BIN = div_pkg::NIT_BIN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       radix10,
  output logic       load,
  output logic       step,
  output logic       finish,
  output logic       busy,
  output logic       done,
  output logic [5:0] iter
);
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_ROUND} state_t;
  state_t     state;
  logic [5:0] cnt;

  assign load   = (state == S_IDLE) && start;
  assign step   = (state == S_ITER);
  assign finish = (state == S_ROUND);
  assign busy   = (state != S_IDLE);
  assign iter   = cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ITER;
          cnt   <= radix10 ? 6'(NIT_DEC - 1) : 6'(NIT_BIN - 1);
        end
        S_ITER: begin
          if (cnt == '0) state <= S_ROUND;
          else           cnt   <= cnt - 6'd1;
        end
        S_ROUND: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // done never coincides with a running division.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
