// prof_env: test environment for workload runs of the profiler kernel. It
// holds the kernel at its default size, the behavioural global memory, and
// tasks that play the host (program the log address, start, poll for done
// at a chosen interval, read registers) and the kernel under test (offer a
// command, stay silent for n cycles). `k` counts cycles since the pipe
// opened; `send` returns the timestamp the command must receive, k in the
// cycle it is accepted. Testbenches call the tasks hierarchically.
module prof_env;
  import prof_pkg::*;

  logic ap_clk = 0, ap_rst_n = 0;
  logic [5:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [1:0] bresp, rresp;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic tvalid = 0, tready;
  logic [31:0] tdata = '0;
  logic [63:0] m_awaddr, m_wdata;
  logic [7:0] m_awlen, m_wstrb; logic [2:0] m_awsize; logic [1:0] m_awburst, m_bresp;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_wlast, m_bvalid, m_bready;
  int n_mem_writes, n_stalls, n_bad;
  longint k = 0;
  bit open_seen = 0;
  int not_ready = 0;       // commands offered to a closed pipe

  profcounter dut (
    .ap_clk, .ap_rst_n,
    .s_axi_control_awaddr(awaddr), .s_axi_control_awvalid(awvalid),
    .s_axi_control_awready(awready), .s_axi_control_wdata(wdata),
    .s_axi_control_wstrb(4'hF), .s_axi_control_wvalid(wvalid),
    .s_axi_control_wready(wready), .s_axi_control_bresp(bresp),
    .s_axi_control_bvalid(bvalid), .s_axi_control_bready(bready),
    .s_axi_control_araddr(araddr), .s_axi_control_arvalid(arvalid),
    .s_axi_control_arready(arready), .s_axi_control_rdata(rdata),
    .s_axi_control_rresp(rresp), .s_axi_control_rvalid(rvalid),
    .s_axi_control_rready(rready),
    .s_axis_cmd_tvalid(tvalid), .s_axis_cmd_tready(tready), .s_axis_cmd_tdata(tdata),
    .m_axi_gmem_awaddr(m_awaddr), .m_axi_gmem_awlen(m_awlen),
    .m_axi_gmem_awsize(m_awsize), .m_axi_gmem_awburst(m_awburst),
    .m_axi_gmem_awvalid(m_awvalid), .m_axi_gmem_awready(m_awready),
    .m_axi_gmem_wdata(m_wdata), .m_axi_gmem_wstrb(m_wstrb),
    .m_axi_gmem_wlast(m_wlast), .m_axi_gmem_wvalid(m_wvalid),
    .m_axi_gmem_wready(m_wready), .m_axi_gmem_bresp(m_bresp),
    .m_axi_gmem_bvalid(m_bvalid), .m_axi_gmem_bready(m_bready)
  );

  axi_wr_mem_model #(.READY_PCT(70)) mem (
    .clk(ap_clk), .rst_n(ap_rst_n), .awaddr(m_awaddr), .awlen(m_awlen),
    .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata), .wlast(m_wlast),
    .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready), .n_writes(n_mem_writes), .n_stalls(n_stalls),
    .n_bad_bursts(n_bad));

  always #5 ap_clk = ~ap_clk;

  always @(posedge ap_clk) begin
    if (tready && !open_seen) begin open_seen <= 1; k <= 1; end
    else if (open_seen) k <= k + 1;
  end

  task automatic reset();
    repeat (3) @(posedge ap_clk);
    #1 ap_rst_n = 1;
    repeat (2) @(posedge ap_clk); #1;
  endtask

  task automatic reg_write(input logic [5:0] a, input logic [31:0] d);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    while (awvalid || wvalid) begin
      @(posedge ap_clk);
      if (awready) awvalid <= 0;
      if (wready)  wvalid  <= 0;
      #1;
    end
    bready = 1;
    while (!bvalid) begin @(posedge ap_clk); #1; end
    @(posedge ap_clk); #1;
    bready = 0;
  endtask

  task automatic reg_read(input logic [5:0] a, output logic [31:0] d);
    araddr = a; arvalid = 1;
    do @(posedge ap_clk); while (!arready);
    #1 arvalid = 0; rready = 1;
    while (!rvalid) begin @(posedge ap_clk); #1; end
    d = rdata;
    @(posedge ap_clk); #1;
    rready = 0;
  endtask

  // Program the log address and start; the next pipe opening is count 0.
  task automatic host_start(input logic [63:0] base);
    open_seen = 0; k = 0;
    reg_write(6'h10, base[31:0]);
    reg_write(6'h14, base[63:32]);
    reg_write(6'h00, 32'h1);
  endtask

  task automatic host_wait_done(input int poll_gap);
    logic [31:0] v;
    forever begin
      reg_read(6'h00, v);
      if (v[1]) break;
      repeat (poll_gap) @(posedge ap_clk);
      #1;
    end
  endtask

  task automatic wait_open();
    while (!tready) begin @(posedge ap_clk); #1; end
  endtask

  // Offer one command; returns the count it must be stamped with.
  task automatic send(input logic [15:0] op, input logic [15:0] id, output longint stamp);
    tvalid = 1; tdata = {id, op};
    @(posedge ap_clk);
    if (!tready) not_ready++;
    stamp = k;
    #1 tvalid = 0;
  endtask

  task automatic idle(input longint n);
    for (longint i = 0; i < n; i++) @(posedge ap_clk);
    #1;
  endtask

  function automatic logic [63:0] log_word(input logic [63:0] base, input int i);
    return mem.read_word(base + 64'(8 * i));
  endfunction
endmodule
