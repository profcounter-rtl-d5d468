// cmd_decoder: non-blocking receiver of the command pipe.
//
// The kernel under test writes 32-bit command words (prof_pkg::cmd_t) into an
// AXI4-Stream pipe. While the kernel runs (`run`) and no FINISH has been seen,
// the decoder accepts a word in every cycle it is offered (`s_tready` high),
// so the writer never waits and the cycle counter is never held up by the
// pipe. In the accepting cycle:
//   STAMP       -> a log entry with the current `cycle` is written (`push`)
//   CHECKPOINT  -> the same, with the checkpoint flag and ID set
//   FINISH      -> `finish` pulses; the pipe is closed until the next `clear`
//   NOP/other   -> nothing
// `push`/`entry` are combinational so the entry is written into the buffer at
// the same clock edge the word is accepted, and carry the count of that
// cycle. If the buffer is full (`buf_full`) the entry is dropped and counted
// in `n_dropped`; `n_stamps` counts the entries stored since `clear`.
// The command set follows the profiler's header; the encodings, the drop
// policy and the counters are this design's choices.
module cmd_decoder
  import prof_pkg::*;
#(
  parameter int unsigned CNT_W = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,      // start of a run: reopen the pipe
  input  logic               run,        // kernel is running
  // command pipe (AXI4-Stream slave)
  input  logic               s_tvalid,
  output logic               s_tready,
  input  logic [CMD_W-1:0]   s_tdata,
  // cycle count
  input  logic [CNT_W-1:0]   cycle,
  // timestamp buffer write side
  input  logic               buf_full,
  output logic               push,
  output log_entry_t         entry,
  // status
  output logic               finish,     // one-cycle pulse on FINISH
  output logic               finished,   // FINISH seen since clear
  output logic [31:0]        n_stamps,
  output logic [31:0]        n_dropped
);

  cmd_t cmd;
  logic acc, is_stamp, is_chk, is_fin;
  logic [63:0] cycle64;

  assign cmd      = cmd_t'(s_tdata);
  assign s_tready = run && !finished;
  assign acc      = s_tvalid && s_tready;
  assign is_stamp = acc && (cmd.op == COMM_STAMP);
  assign is_chk   = acc && (cmd.op == COMM_CHECKPOINT);
  assign is_fin   = acc && (cmd.op == COMM_FINISH);
  assign cycle64  = 64'(cycle);

  assign push   = (is_stamp || is_chk) && !buf_full;
  assign entry  = make_entry(is_chk, cmd.id[ID_W-1:0], cycle64[STAMP_CYC_W-1:0]);
  assign finish = is_fin;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      finished  <= 1'b0;
      n_stamps  <= '0;
      n_dropped <= '0;
    end else begin
      if (is_fin) finished <= 1'b1;
      if (push) n_stamps <= n_stamps + 1'b1;
      if ((is_stamp || is_chk) && buf_full) n_dropped <= n_dropped + 1'b1;
    end
  end

endmodule
