// ctrl_regs: AXI4-Lite control slave of the profiler kernel.
//
// The host starts the kernel and passes it the address of the log array
// (the kernel's single argument, a pointer to 64-bit words) through these
// registers; it polls them to see when the log is complete.
//   0x00 CTRL   bit0 ap_start (write 1 to start; cleared by hardware on
//               ap_ready), bit1 ap_done (sticky, cleared when read),
//               bit2 ap_idle, bit3 ap_ready (read only)
//   0x10 LOG_LO low 32 bits of the log address
//   0x14 LOG_HI high 32 bits of the log address
//   0x18 STAMPS number of timestamps stored in the last run   (read only)
//   0x1C DROPS  number of timestamps lost to a full buffer     (read only)
//   0x20 WRITTEN number of log words written to global memory  (read only)
//   0x24 STATUS bit0: a log write got an error response        (read only)
// Other addresses read as zero and ignore writes. Writes take the address
// and data channels in any order and answer one cycle after both are in;
// reads answer one cycle after the address. All accesses are 32 bits wide
// and byte strobes are ignored. The offsets 0x00 and 0x10 follow the usual
// layout of HLS kernel control registers; the status registers and the
// timing are this design's own.
module ctrl_regs #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned LOG_W  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // kernel side
  output logic              ap_start,
  input  logic              ap_done,
  input  logic              ap_idle,
  input  logic              ap_ready,
  output logic [LOG_W-1:0]  log_addr,
  input  logic [31:0]       n_stamps,
  input  logic [31:0]       n_dropped,
  input  logic [31:0]       n_written,
  input  logic              resp_err
);

  localparam logic [ADDR_W-1:0] A_CTRL    = ADDR_W'('h00);
  localparam logic [ADDR_W-1:0] A_LOG_LO  = ADDR_W'('h10);
  localparam logic [ADDR_W-1:0] A_LOG_HI  = ADDR_W'('h14);
  localparam logic [ADDR_W-1:0] A_STAMPS  = ADDR_W'('h18);
  localparam logic [ADDR_W-1:0] A_DROPS   = ADDR_W'('h1C);
  localparam logic [ADDR_W-1:0] A_WRITTEN = ADDR_W'('h20);
  localparam logic [ADDR_W-1:0] A_STATUS  = ADDR_W'('h24);

  logic [ADDR_W-1:0] wa;
  logic [31:0]       wd;
  logic              wa_ok, wd_ok, done_sticky;
  logic [63:0]       log64;
  logic              wr_fire, rd_fire;

  assign s_awready = !wa_ok && !s_bvalid;
  assign s_wready  = !wd_ok && !s_bvalid;
  assign s_arready = !s_rvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign wr_fire   = wa_ok && wd_ok;
  assign rd_fire   = s_arvalid && s_arready;
  assign log_addr  = LOG_W'(log64);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wa <= '0; wd <= '0; wa_ok <= 1'b0; wd_ok <= 1'b0;
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
      ap_start <= 1'b0; done_sticky <= 1'b0; log64 <= '0;
    end else begin
      // write channels
      if (s_awvalid && s_awready) begin wa <= s_awaddr; wa_ok <= 1'b1; end
      if (s_wvalid && s_wready)   begin wd <= s_wdata;  wd_ok <= 1'b1; end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;

      // kernel handshake: start holds until the kernel is ready
      if (ap_ready) ap_start <= 1'b0;
      if (ap_done)  done_sticky <= 1'b1;

      if (wr_fire) begin
        wa_ok <= 1'b0; wd_ok <= 1'b0; s_bvalid <= 1'b1;
        unique case (wa)
          A_CTRL:   if (wd[0]) ap_start <= 1'b1;
          A_LOG_LO: log64[31:0]  <= wd;
          A_LOG_HI: log64[63:32] <= wd;
          default: ;
        endcase
      end

      // read channel
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr)
          A_CTRL: begin
            s_rdata <= {28'd0, ap_ready, ap_idle, done_sticky, ap_start};
            if (!ap_done) done_sticky <= 1'b0;   // clear on read
          end
          A_LOG_LO:  s_rdata <= log64[31:0];
          A_LOG_HI:  s_rdata <= log64[63:32];
          A_STAMPS:  s_rdata <= n_stamps;
          A_DROPS:   s_rdata <= n_dropped;
          A_WRITTEN: s_rdata <= n_written;
          A_STATUS:  s_rdata <= {31'd0, resp_err};
          default:   s_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response is held until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             (s_bvalid && !s_bready) |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             (s_rvalid && !s_rready) |=> (s_rvalid && $stable(s_rdata)));

endmodule
