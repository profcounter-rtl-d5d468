// tb_log_writer: fills a model of the timestamp buffer (one-cycle read
// latency) with random words and lets the writer flush it into the
// behavioural memory under random back-pressure. Checks every word lands at
// base + 8*i, the count of writes, done, the error flag on an error
// response, and an empty flush (done with nothing written).
module tb_log_writer;
  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] base_addr = '0;
  logic done, resp_err, buf_empty, buf_rd;
  logic [31:0] n_written;
  logic [63:0] buf_data;
  logic [63:0] m_awaddr, m_wdata;
  logic [7:0] m_awlen; logic [2:0] m_awsize; logic [1:0] m_awburst;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_wlast, m_bvalid, m_bready;
  logic [7:0] m_wstrb; logic [1:0] m_bresp;
  int n_writes, n_stalls, n_bad;
  logic [63:0] fifo[$];
  logic [63:0] sent[$];
  int checks = 0, failures = 0;
  localparam logic [63:0] ERRA = 64'h2000_0000 + 8 * 5;

  log_writer #(.ADDR_W(64), .DATA_W(64)) dut (.*);
  axi_wr_mem_model #(.READY_PCT(50), .ERR_ADDR(ERRA)) mem (
    .clk, .rst_n, .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid),
    .awready(m_awready), .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid),
    .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .n_writes(n_writes), .n_stalls(n_stalls), .n_bad_bursts(n_bad));

  always #5 clk = ~clk;

  // buffer model
  assign buf_empty = (fifo.size() == 0);
  always @(posedge clk) if (buf_rd && fifo.size() > 0) buf_data <= fifo.pop_front();

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic flush(input int n, input logic [63:0] base, input bit expect_err);
    int cycles = 0;
    sent.delete();
    for (int i = 0; i < n; i++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      fifo.push_back(w); sent.push_back(w);
    end
    base_addr = base;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    while (!done) begin @(posedge clk); #1 cycles++; end
    chk(n_written == n, "n_written");
    chk(fifo.size() == 0, "buffer drained");
    chk(resp_err == expect_err, "error flag");
    for (int i = 0; i < n; i++)
      chk(mem.read_word(base + 64'(8 * i)) == sent[i], $sformatf("word %0d", i));
    chk(!mem.has_word(base + 64'(8 * n)), "no write past the end");
    @(posedge clk);
    #1 chk(!done, "done is a pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    flush(0, 64'h1000_0000, 0);
    flush(37, 64'h1000_0000, 0);
    flush(12, 64'h2000_0000, 1);
    flush(200, 64'h0000_0008_0000_0000, 0);
    chk(n_stalls > 0, "back-pressure exercised");
    chk(n_bad == 0, "single-beat bursts with WLAST");
    chk(m_awsize == 3'd3 && m_awburst == 2'b01 && m_wstrb == 8'hFF, "AXI attributes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
