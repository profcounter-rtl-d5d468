// prof_ctrl: run control of the profiler kernel.
//
// States (prof_pkg::ctrl_state_e):
//   IDLE  - waiting; `ap_idle` high. `ap_start` moves to RUN and gives a
//           one-cycle `clear` that zeroes the cycle counter, the counters
//           of the decoder and the timestamp buffer.
//   RUN   - the cycle counter counts and the command pipe is open (`run`).
//           The FINISH command (`finish`) ends the run.
//   FLUSH - `flush_start` pulses on entry; the log writer copies the buffer
//           to global memory. `flush_done` ends it.
//   DONE  - one cycle with `ap_done` and `ap_ready` high, then IDLE.
// The profiler kernel is started by the host together with the kernel
// under test and ends after FINISH and the flush; the handshake names follow
// the usual block-level control protocol of HLS kernels (ap_start, ap_done,
// ap_idle, ap_ready), the rest is this design's own.
module prof_ctrl
  import prof_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ap_start,
  output logic        ap_idle,
  output logic        ap_done,
  output logic        ap_ready,
  input  logic        finish,
  input  logic        flush_done,
  output logic        clear,
  output logic        run,
  output logic        flush_start,
  output ctrl_state_e state
);

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ST_IDLE;
    else begin
      unique case (state)
        ST_IDLE:  if (ap_start)   state <= ST_RUN;
        ST_RUN:   if (finish)     state <= ST_FLUSH;
        ST_FLUSH: if (flush_done) state <= ST_DONE;
        ST_DONE:                  state <= ST_IDLE;
        default:                  state <= ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) flush_start <= 1'b0;
    else        flush_start <= (state == ST_RUN) && finish;
  end

  assign ap_idle  = (state == ST_IDLE);
  assign ap_done  = (state == ST_DONE);
  assign ap_ready = ap_done;
  assign clear    = (state == ST_IDLE) && ap_start;
  assign run      = (state == ST_RUN);

endmodule
