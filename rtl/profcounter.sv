// profcounter: line-level cycle-counter kernel for HLS-generated kernels.
//
// A kernel under test (KUT) marks points in its code by writing command
// words into a stream pipe that ends here. The profiler counts clock cycles
// from its own start, and for every STAMP or CHECKPOINT command records the
// cycle count of the cycle it accepted the command into an on-chip buffer.
// The pipe is read without ever blocking, so the counter advances in every
// cycle whether or not the KUT is sending, and a pipe word is accepted in the
// same cycle it is offered. The difference of two timestamps is the latency
// of the code between them. After the FINISH command the buffer is copied to
// the log array in global memory, so the profiler does not compete with the
// KUT for memory bandwidth while it is being measured.
//
// Structure:
//   ctrl_regs     AXI4-Lite control/argument registers (host side)
//   prof_ctrl     IDLE -> RUN -> FLUSH -> DONE run control
//   cycle_counter 64-bit cycle counter, zeroed at start
//   cmd_decoder   pipe receiver, builds log entries
//   stamp_fifo    timestamp buffer (512 x 64 bit, one block RAM)
//   log_writer    AXI4 write master that flushes the buffer
// Interfaces: s_axi_control (AXI4-Lite, 32 bit), s_axis_cmd (command pipe,
// 32-bit AXI4-Stream), m_axi_gmem (AXI4 write channels, 64 bit). The
// master's read channels are not used and not brought out.
// Timing: the timestamp of a command offered in cycle k after the run
// started is k (the start cycle itself is count 0). The buffer, counter
// and non-blocking pipe follow the profiler's design; widths, encodings and
// register map are this design's choices (see prof_pkg and ctrl_regs).
module profcounter
  import prof_pkg::*;
#(
  parameter int unsigned DEPTH  = 512,  // timestamp buffer entries
  parameter int unsigned CNT_W  = 64,   // cycle counter width
  parameter int unsigned ADDR_W = 64    // global memory address width
) (
  input  logic                 ap_clk,
  input  logic                 ap_rst_n,
  // AXI4-Lite control
  input  logic [5:0]           s_axi_control_awaddr,
  input  logic                 s_axi_control_awvalid,
  output logic                 s_axi_control_awready,
  input  logic [31:0]          s_axi_control_wdata,
  input  logic [3:0]           s_axi_control_wstrb,
  input  logic                 s_axi_control_wvalid,
  output logic                 s_axi_control_wready,
  output logic [1:0]           s_axi_control_bresp,
  output logic                 s_axi_control_bvalid,
  input  logic                 s_axi_control_bready,
  input  logic [5:0]           s_axi_control_araddr,
  input  logic                 s_axi_control_arvalid,
  output logic                 s_axi_control_arready,
  output logic [31:0]          s_axi_control_rdata,
  output logic [1:0]           s_axi_control_rresp,
  output logic                 s_axi_control_rvalid,
  input  logic                 s_axi_control_rready,
  // command pipe from the kernel under test
  input  logic                 s_axis_cmd_tvalid,
  output logic                 s_axis_cmd_tready,
  input  logic [CMD_W-1:0]     s_axis_cmd_tdata,
  // global memory, write channels
  output logic [ADDR_W-1:0]    m_axi_gmem_awaddr,
  output logic [7:0]           m_axi_gmem_awlen,
  output logic [2:0]           m_axi_gmem_awsize,
  output logic [1:0]           m_axi_gmem_awburst,
  output logic                 m_axi_gmem_awvalid,
  input  logic                 m_axi_gmem_awready,
  output logic [ENTRY_W-1:0]   m_axi_gmem_wdata,
  output logic [ENTRY_W/8-1:0] m_axi_gmem_wstrb,
  output logic                 m_axi_gmem_wlast,
  output logic                 m_axi_gmem_wvalid,
  input  logic                 m_axi_gmem_wready,
  input  logic [1:0]           m_axi_gmem_bresp,
  input  logic                 m_axi_gmem_bvalid,
  output logic                 m_axi_gmem_bready
);

  localparam int unsigned FAW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic              ap_start, ap_idle, ap_done, ap_ready;
  logic [ADDR_W-1:0] log_addr;
  logic              clear, run, flush_start, flush_done;
  ctrl_state_e       state;
  logic [CNT_W-1:0]  cycle;
  logic              finish, finished, push;
  log_entry_t        entry;
  logic [31:0]       n_stamps, n_dropped, n_written;
  logic              resp_err;
  logic              buf_full, buf_empty, buf_rd;
  logic [ENTRY_W-1:0] buf_data;
  logic [FAW:0]      buf_count;

  ctrl_regs #(.ADDR_W(6), .LOG_W(ADDR_W)) u_regs (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_awaddr(s_axi_control_awaddr), .s_awvalid(s_axi_control_awvalid),
    .s_awready(s_axi_control_awready),
    .s_wdata(s_axi_control_wdata), .s_wstrb(s_axi_control_wstrb),
    .s_wvalid(s_axi_control_wvalid), .s_wready(s_axi_control_wready),
    .s_bresp(s_axi_control_bresp), .s_bvalid(s_axi_control_bvalid),
    .s_bready(s_axi_control_bready),
    .s_araddr(s_axi_control_araddr), .s_arvalid(s_axi_control_arvalid),
    .s_arready(s_axi_control_arready),
    .s_rdata(s_axi_control_rdata), .s_rresp(s_axi_control_rresp),
    .s_rvalid(s_axi_control_rvalid), .s_rready(s_axi_control_rready),
    .ap_start(ap_start), .ap_done(ap_done), .ap_idle(ap_idle), .ap_ready(ap_ready),
    .log_addr(log_addr), .n_stamps(n_stamps), .n_dropped(n_dropped),
    .n_written(n_written), .resp_err(resp_err)
  );

  prof_ctrl u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .ap_start(ap_start), .ap_idle(ap_idle), .ap_done(ap_done), .ap_ready(ap_ready),
    .finish(finish), .flush_done(flush_done),
    .clear(clear), .run(run), .flush_start(flush_start), .state(state)
  );

  cycle_counter #(.W(CNT_W)) u_counter (
    .clk(ap_clk), .rst_n(ap_rst_n), .clear(clear), .en(run), .count(cycle)
  );

  cmd_decoder #(.CNT_W(CNT_W)) u_decoder (
    .clk(ap_clk), .rst_n(ap_rst_n), .clear(clear), .run(run),
    .s_tvalid(s_axis_cmd_tvalid), .s_tready(s_axis_cmd_tready),
    .s_tdata(s_axis_cmd_tdata),
    .cycle(cycle), .buf_full(buf_full), .push(push), .entry(entry),
    .finish(finish), .finished(finished),
    .n_stamps(n_stamps), .n_dropped(n_dropped)
  );

  stamp_fifo #(.W(ENTRY_W), .DEPTH(DEPTH)) u_buffer (
    .clk(ap_clk), .rst_n(ap_rst_n), .clear(clear),
    .wr_en(push), .wr_data(entry),
    .rd_en(buf_rd), .rd_data(buf_data),
    .full(buf_full), .empty(buf_empty), .count(buf_count)
  );

  log_writer #(.ADDR_W(ADDR_W), .DATA_W(ENTRY_W)) u_writer (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .start(flush_start), .base_addr(log_addr),
    .done(flush_done), .n_written(n_written), .resp_err(resp_err),
    .buf_empty(buf_empty), .buf_rd(buf_rd), .buf_data(buf_data),
    .m_awaddr(m_axi_gmem_awaddr), .m_awlen(m_axi_gmem_awlen),
    .m_awsize(m_axi_gmem_awsize), .m_awburst(m_axi_gmem_awburst),
    .m_awvalid(m_axi_gmem_awvalid), .m_awready(m_axi_gmem_awready),
    .m_wdata(m_axi_gmem_wdata), .m_wstrb(m_axi_gmem_wstrb),
    .m_wlast(m_axi_gmem_wlast), .m_wvalid(m_axi_gmem_wvalid),
    .m_wready(m_axi_gmem_wready),
    .m_bresp(m_axi_gmem_bresp), .m_bvalid(m_axi_gmem_bvalid),
    .m_bready(m_axi_gmem_bready)
  );

  // The pipe is only open while running, and entries are only written then.
  a_push_in_run: assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                                  push |-> (state == ST_RUN));
  // The buffer is not read while the run is being measured.
  a_no_read_in_run: assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                                     (state == ST_RUN) |-> !buf_rd);

endmodule
