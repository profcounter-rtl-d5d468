// tb_profcounter: end-to-end test of the profiler kernel at its default
// size. A host model programs the log address over AXI4-Lite, starts the
// kernel and polls for done; a model of a kernel under test sends commands
// through the pipe; a behavioural memory takes the flushed log with random
// back-pressure. The expected timestamp of each command is worked out from
// the pipe alone: the pipe opens in the kernel's first running cycle, which
// is count 0, so a word accepted k cycles later must read k.
// Runs:
//   1  a vector-add style kernel: a stamp, a loop with one checkpoint per
//      iteration and random loop bodies, NOPs and idle gaps, back-to-back
//      stamps, a closing stamp and FINISH; checks every log word and that
//      the difference of the outer stamps equals the modelled loop latency
//   2  more stamps than the buffer holds: checks the drop count, that the
//      first DEPTH stamps are kept and that exactly DEPTH words are written
//   3  an error response from memory: checks the STATUS flag
// Each mechanism (stamp, checkpoint, NOP, idle pipe, back-to-back commands,
// full buffer, memory back-pressure, error response, closed pipe after
// FINISH, restart) is counted and must occur at least once.
module tb_profcounter;
  import prof_pkg::*;
  localparam int unsigned DEPTH = 512;
  localparam logic [63:0] BASE1 = 64'h0000_0000_4000_0000;
  localparam logic [63:0] BASE2 = 64'h0000_0001_0000_0000;
  localparam logic [63:0] BASE3 = 64'h0000_0000_8000_0000;
  localparam logic [63:0] ERRA  = BASE3 + 64'd16;

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

  int checks = 0, failures = 0;
  // mechanism counters
  int c_stamp = 0, c_chk = 0, c_nop = 0, c_idle = 0, c_b2b = 0, c_drop = 0;
  int c_err = 0, c_closed = 0, c_runs = 0;

  // expected log of the current run
  logic [63:0] exp_log[$];
  int k = 0;             // cycles since the pipe opened
  bit open_seen = 0;

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

  axi_wr_mem_model #(.READY_PCT(60), .ERR_ADDR(ERRA)) mem (
    .clk(ap_clk), .rst_n(ap_rst_n), .awaddr(m_awaddr), .awlen(m_awlen),
    .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata), .wlast(m_wlast),
    .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready), .n_writes(n_mem_writes), .n_stalls(n_stalls),
    .n_bad_bursts(n_bad));

  always #5 ap_clk = ~ap_clk;

  initial begin
    repeat (200000) @(posedge ap_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // cycle index since the pipe opened, sampled at each rising edge
  always @(posedge ap_clk) begin
    if (tready && !open_seen) begin open_seen <= 1; k <= 1; end
    else if (open_seen) k <= k + 1;
  end

  // ---------------- host model (AXI4-Lite) ----------------
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

  task automatic host_start(input logic [63:0] base);
    reg_write(6'h10, base[31:0]);
    reg_write(6'h14, base[63:32]);
    reg_write(6'h00, 32'h1);
  endtask

  task automatic host_wait_done();
    logic [31:0] v;
    do reg_read(6'h00, v); while (!v[1]);
    reg_read(6'h00, v);
    chk(!v[1] && v[2], "done cleared on read, idle");
  endtask

  // ---------------- kernel-under-test model ----------------
  // Offer one command word; it is accepted in the cycle it is offered.
  task automatic send(input logic [15:0] op, input logic [15:0] id);
    tvalid = 1; tdata = {id, op};
    @(posedge ap_clk);
    chk(tready, "pipe never blocks a running kernel");
    if (op == COMM_STAMP) begin
      if (exp_log.size() < DEPTH) exp_log.push_back({1'b0, 15'd0, 48'(k)});
      else c_drop++;
      c_stamp++;
    end else if (op == COMM_CHECKPOINT) begin
      if (exp_log.size() < DEPTH) exp_log.push_back({1'b1, id[14:0], 48'(k)});
      else c_drop++;
      c_chk++;
    end else if (op == COMM_NOP) c_nop++;
    #1 tvalid = 0;
  endtask

  task automatic idle(input int n);
    if (n > 0) c_idle++;
    repeat (n) @(posedge ap_clk);
    #1;
  endtask

  task automatic wait_open();
    while (!tready) begin @(posedge ap_clk); #1; end
  endtask

  task automatic finish_run();
    send(COMM_FINISH, 16'd0);
    repeat (3) begin
      checks++; if (tready) begin failures++; $display("FAIL pipe open after FINISH"); end
      @(posedge ap_clk); #1;
    end
    c_closed++;
  endtask

  task automatic check_log(input logic [63:0] base, input int n);
    logic [31:0] v;
    chk(exp_log.size() == n, "expected log size");
    for (int i = 0; i < exp_log.size(); i++)
      chk(mem.read_word(base + 64'(8 * i)) == exp_log[i],
          $sformatf("log word %0d: %h expected %h", i, mem.read_word(base + 64'(8 * i)), exp_log[i]));
    chk(!mem.has_word(base + 64'(8 * exp_log.size())), "nothing past the log");
    reg_read(6'h20, v); chk(v == 32'(exp_log.size()), "WRITTEN register");
  endtask

  initial begin
    logic [31:0] v;
    int loop_start, loop_end, model_lat, a, b, iters;
    repeat (3) @(posedge ap_clk);
    #1 ap_rst_n = 1;
    repeat (2) @(posedge ap_clk); #1;

    // ---- run 1: vector-add style kernel ----
    exp_log.delete(); open_seen = 0; k = 0;
    fork
      begin host_start(BASE1); host_wait_done(); end
      begin
        wait_open();
        idle(7);
        send(COMM_STAMP, 0);                 // PROFCOUNTER_STAMP before the loop
        loop_start = k - 1;
        iters = 20; model_lat = 1;   // the opening stamp's own cycle
        for (int i = 0; i < iters; i++) begin
          int body;
          body = $urandom_range(0, 6);
          send(COMM_CHECKPOINT, 16'(i));     // one identified stamp per iteration
          model_lat += 1;
          if (i % 5 == 2) begin send(COMM_NOP, 0); model_lat += 1; end
          if (i % 7 == 3) begin send(COMM_STAMP, 0); c_b2b++; model_lat += 1; end
          idle(body); model_lat += body;
        end
        send(COMM_STAMP, 0);                 // PROFCOUNTER_STAMP after the loop
        loop_end = k - 1;
        idle(4);
        finish_run();
      end
    join
    c_runs++;
    check_log(BASE1, 2 + 20 + 3);
    reg_read(6'h18, v); chk(v == 25, "STAMPS register run 1");
    reg_read(6'h1C, v); chk(v == 0, "DROPS register run 1");
    a = int'(mem.read_word(BASE1) & 64'hFFFF_FFFF_FFFF);
    b = int'(mem.read_word(BASE1 + 64'(8 * 24)) & 64'hFFFF_FFFF_FFFF);
    chk(b - a == model_lat, $sformatf("loop latency %0d expected %0d", b - a, model_lat));
    chk(a == 7 && loop_start == 7, "first stamp after 7 idle cycles");

    // ---- run 2: more stamps than the buffer holds ----
    exp_log.delete(); open_seen = 0; k = 0;
    fork
      begin host_start(BASE2); host_wait_done(); end
      begin
        wait_open();
        for (int i = 0; i < DEPTH + 9; i++) begin
          send((i % 2 == 1) ? COMM_CHECKPOINT : COMM_STAMP, 16'(i));
          if (i % 100 == 0) idle(1);
        end
        finish_run();
      end
    join
    c_runs++;
    check_log(BASE2, DEPTH);
    reg_read(6'h1C, v); chk(v == 9, "DROPS register run 2");
    reg_read(6'h18, v); chk(v == DEPTH, "STAMPS register run 2");

    // ---- run 3: an error response from memory ----
    exp_log.delete(); open_seen = 0; k = 0;
    fork
      begin host_start(BASE3); host_wait_done(); end
      begin
        wait_open();
        for (int i = 0; i < 4; i++) begin send(COMM_STAMP, 0); idle(i); end
        finish_run();
      end
    join
    c_runs++;
    check_log(BASE3, 4);
    reg_read(6'h24, v); chk(v[0], "STATUS error flag");
    if (v[0]) c_err++;

    chk(n_bad == 0, "single-beat writes");
    $display("mechanisms: stamp=%0d checkpoint=%0d nop=%0d idle=%0d back_to_back=%0d drop=%0d mem_stall=%0d err=%0d closed=%0d runs=%0d",
             c_stamp, c_chk, c_nop, c_idle, c_b2b, c_drop, n_stalls, c_err, c_closed, c_runs);
    chk(c_stamp > 0, "stamp seen");       chk(c_chk > 0, "checkpoint seen");
    chk(c_nop > 0, "nop seen");           chk(c_idle > 0, "idle pipe seen");
    chk(c_b2b > 0, "back-to-back seen");  chk(c_drop > 0, "full buffer seen");
    chk(n_stalls > 0, "memory back-pressure seen");
    chk(c_err > 0, "error response seen");
    chk(c_closed > 0, "closed pipe seen"); chk(c_runs == 3, "restart seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
