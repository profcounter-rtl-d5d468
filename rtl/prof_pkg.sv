// prof_pkg: types and constants shared by the cycle-counter kernel.
//
// The kernel under test talks to the profiler through a 32-bit command word
// sent over a stream pipe. The low 16 bits carry the opcode (NOP, STAMP,
// FINISH, CHECKPOINT), the high 16 bits the checkpoint ID. The opcodes follow
// the command names of the profiler's header (COMM_NOP, COMM_STAMP,
// COMM_FINISH and the identified checkpoint stamp); their numeric values and
// the field layout are this design's choice.
//
// Every timestamp becomes one 64-bit log entry in global memory:
//   [63]    checkpoint flag (0 = plain stamp, 1 = identified checkpoint)
//   [62:48] checkpoint ID (zero for a plain stamp)
//   [47:0]  cycle count at which the command was accepted
// 48 bits of cycle count cover about 10 days at 300 MHz. The entry format is
// this design's choice; only "a 64-bit log of cycle counts" is given.
package prof_pkg;

  localparam int unsigned CMD_W     = 32;  // width of the pipe command word
  localparam int unsigned ENTRY_W   = 64;  // width of one log entry (long)
  localparam int unsigned STAMP_CYC_W = 48;  // cycle bits kept in an entry
  localparam int unsigned ID_W      = 15;  // checkpoint ID bits kept

  typedef enum logic [15:0] {
    COMM_NOP        = 16'd0,
    COMM_STAMP      = 16'd1,
    COMM_FINISH     = 16'd2,
    COMM_CHECKPOINT = 16'd3
  } comm_op_e;

  typedef struct packed {
    logic [15:0] id;
    logic [15:0] op;   // compared against comm_op_e; unknown codes act as NOP
  } cmd_t;

  typedef struct packed {
    logic                   is_checkpoint;
    logic [ID_W-1:0]        id;
    logic [STAMP_CYC_W-1:0] cycle;
  } log_entry_t;

  // Build a log entry from a command and the cycle count it was accepted at.
  function automatic log_entry_t make_entry(input logic chk,
                                            input logic [ID_W-1:0] id,
                                            input logic [STAMP_CYC_W-1:0] cycle);
    log_entry_t e;
    e.is_checkpoint = chk;
    e.id            = chk ? id : '0;
    e.cycle         = cycle;
    return e;
  endfunction

  // Kernel control states (see prof_ctrl).
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_RUN   = 2'd1,
    ST_FLUSH = 2'd2,
    ST_DONE  = 2'd3
  } ctrl_state_e;

  // AXI4 response codes used by the log writer.
  localparam logic [1:0] AXI_RESP_OKAY = 2'b00;

endpackage
