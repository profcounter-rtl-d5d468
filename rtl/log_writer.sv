// log_writer: flushes the timestamp buffer into the log array in global
// memory once the kernel under test has finished.
//
// On a one-cycle `start` it latches `base_addr` and then, until the buffer is
// empty, pops one entry, writes it to base_addr + 8*i with a single-beat
// AXI4 write (AWLEN = 0, 8-byte beats, all byte strobes set) and waits for
// the write response before the next one. Address and data are offered
// together; each channel drops its VALID on its own handshake. When the
// buffer is empty, `done` pulses for one cycle. `n_written` counts entries
// written since `start`, `resp_err` is set if any response was not OKAY.
// The buffer read has one cycle of latency (see stamp_fifo).
// Flushing only after the run follows the profiler's scheme, which keeps the
// profiler off the memory bus while the kernel under test runs. The AXI4
// single-beat protocol is this design's choice; the flush is not on the
// timing path of any measurement, so it is kept simple rather than fast.
module log_writer
  import prof_pkg::*;
#(
  parameter int unsigned ADDR_W = 64,
  parameter int unsigned DATA_W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ADDR_W-1:0]   base_addr,
  output logic                done,
  output logic [31:0]         n_written,
  output logic                resp_err,
  // timestamp buffer read side
  input  logic                buf_empty,
  output logic                buf_rd,
  input  logic [DATA_W-1:0]   buf_data,
  // AXI4 write master
  output logic [ADDR_W-1:0]   m_awaddr,
  output logic [7:0]          m_awlen,
  output logic [2:0]          m_awsize,
  output logic [1:0]          m_awburst,
  output logic                m_awvalid,
  input  logic                m_awready,
  output logic [DATA_W-1:0]   m_wdata,
  output logic [DATA_W/8-1:0] m_wstrb,
  output logic                m_wlast,
  output logic                m_wvalid,
  input  logic                m_wready,
  input  logic [1:0]          m_bresp,
  input  logic                m_bvalid,
  output logic                m_bready
);

  typedef enum logic [2:0] {W_IDLE, W_CHECK, W_FETCH, W_SEND, W_RESP, W_DONE} wstate_e;
  wstate_e state;
  logic [ADDR_W-1:0] addr;

  assign m_awaddr  = addr;
  assign m_awlen   = 8'd0;
  assign m_awsize  = 3'($clog2(DATA_W/8));
  assign m_awburst = 2'b01;             // INCR
  assign m_wstrb   = '1;
  assign m_wlast   = 1'b1;
  assign m_bready  = (state == W_RESP);
  assign buf_rd    = (state == W_CHECK) && !buf_empty;
  assign done      = (state == W_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= W_IDLE;
      addr      <= '0;
      m_awvalid <= 1'b0;
      m_wvalid  <= 1'b0;
      m_wdata   <= '0;
      n_written <= '0;
      resp_err  <= 1'b0;
    end else begin
      unique case (state)
        W_IDLE: if (start) begin
          addr      <= base_addr;
          n_written <= '0;
          resp_err  <= 1'b0;
          state     <= W_CHECK;
        end
        W_CHECK: state <= buf_empty ? W_DONE : W_FETCH;
        W_FETCH: begin                       // buffer data valid now
          m_wdata   <= buf_data;
          m_awvalid <= 1'b1;
          m_wvalid  <= 1'b1;
          state     <= W_SEND;
        end
        W_SEND: begin
          if (m_awready) m_awvalid <= 1'b0;
          if (m_wready)  m_wvalid  <= 1'b0;
          if ((!m_awvalid || m_awready) && (!m_wvalid || m_wready)) state <= W_RESP;
        end
        W_RESP: if (m_bvalid) begin
          if (m_bresp != AXI_RESP_OKAY) resp_err <= 1'b1;
          n_written <= n_written + 1'b1;
          addr      <= addr + ADDR_W'(DATA_W/8);
          state     <= W_CHECK;
        end
        W_DONE: state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end

  // AXI rule: a VALID, once raised, stays high with stable payload until READY.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              (m_awvalid && !m_awready) |=> (m_awvalid && $stable(m_awaddr)));
  a_w_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                              (m_wvalid && !m_wready) |=> (m_wvalid && $stable(m_wdata)));

endmodule
