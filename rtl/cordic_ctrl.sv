// cordic_ctrl: sequencer of the iterative CORDIC rotator.
//
// Two states. In IDLE it waits for load; the clock edge that sees load high
// starts an operation (start = 1 in that cycle tells the datapath to capture
// its inputs). In RUN it issues N iterations, one per clock, with idx counting
// 0 .. N-1 (step = 1 in each of those cycles, last = 1 in the final one).
// After the edge that completes the last iteration it is back in IDLE and
// ready is high for exactly one clock.
//
// Timing, load seen at edge 0: iterations happen on edges 1 .. N, ready is
// high between edge N and edge N+1. A load is accepted in any IDLE cycle,
// including the ready cycle, so operations can follow back to back every N+1
// clocks; a load during RUN is ignored. This is the cycle behaviour of the
// original model; the explicit state machine and counter are this design's.
//
// Reset: asynchronous, active low; the sequencer is idle with ready low.
module cordic_ctrl
  import cordic_pkg::*;
#(
  parameter int unsigned N     = CORDIC_ITERS,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  output logic             start,
  output logic             step,
  output logic             last,
  output logic [IDX_W-1:0] idx,
  output logic             ready
);

  typedef enum logic {IDLE, RUN} state_t;

  state_t state;

  initial begin
    if (N < 1) $fatal(1, "cordic_ctrl: N must be at least 1");
  end

  assign start = (state == IDLE) && load;
  assign step  = (state == RUN);
  assign last  = (state == RUN) && (idx == IDX_W'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
      ready <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state)
        IDLE: begin
          if (load) begin
            state <= RUN;
            idx   <= '0;
          end
        end
        RUN: begin
          if (last) begin
            state <= IDLE;
            ready <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // ready is a single-cycle pulse and only follows a last iteration.
  assert property (@(posedge clk) disable iff (!rst_n) ready |=> !ready);
  assert property (@(posedge clk) disable iff (!rst_n) last |=> ready);

endmodule
