// tb_ctrl_regs: drives the AXI4-Lite control slave like a host does: writes
// the log address, sets ap_start, checks it is held until ap_ready and
// cleared then, that ap_done is sticky until CTRL is read, that the
// read-only status registers show their inputs, and that address and data
// of a write may arrive in either order.
module tb_ctrl_regs;
  logic clk = 0, rst_n = 0;
  logic [5:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0] s_wstrb = '1;
  logic [1:0] s_bresp, s_rresp;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic ap_start, ap_done = 0, ap_idle = 1, ap_ready = 0;
  logic [63:0] log_addr;
  logic [31:0] n_stamps = 32'd17, n_dropped = 32'd3, n_written = 32'd14;
  logic resp_err = 0;
  logic [31:0] rd;
  int checks = 0, failures = 0;

  ctrl_regs #(.ADDR_W(6), .LOG_W(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // order: 0 together, 1 address first, 2 data first
  task automatic axil_write(input logic [5:0] a, input logic [31:0] d, input int order);
    bit aw_done = 0, w_done = 0;
    s_awaddr = a; s_wdata = d;
    s_awvalid = (order != 2); s_wvalid = (order != 1);
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (s_awvalid && s_awready) aw_done = 1;
      if (s_wvalid && s_wready) w_done = 1;
      #1;
      if (aw_done) s_awvalid = 0; else if (order == 2 && w_done) s_awvalid = 1;
      if (w_done) s_wvalid = 0; else if (order == 1 && aw_done) s_wvalid = 1;
    end
    s_bready = ($urandom_range(0, 1) == 1);
    while (!(s_bvalid && s_bready)) begin
      @(posedge clk); #1;
      s_bready = 1;
      if (s_bvalid && s_bready) begin @(posedge clk); #1; break; end
    end
    s_bready = 0;
  endtask

  task automatic axil_read(input logic [5:0] a, output logic [31:0] d);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    s_rready = 1;
    while (!s_rvalid) begin @(posedge clk); #1; end
    d = s_rdata;
    chk(s_rresp == 2'b00, "rresp");
    @(posedge clk); #1;
    s_rready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    axil_write(6'h10, 32'hCAFE_0000, 0);
    axil_write(6'h14, 32'h0000_0012, 1);
    chk(log_addr == 64'h0000_0012_CAFE_0000, "log address");
    axil_read(6'h10, rd); chk(rd == 32'hCAFE_0000, "read LOG_LO");
    axil_read(6'h14, rd); chk(rd == 32'h12, "read LOG_HI");
    axil_read(6'h00, rd); chk(rd == 32'h4, "CTRL idle");
    chk(!ap_start, "not started");
    axil_write(6'h00, 32'h1, 2);
    chk(ap_start, "ap_start set");
    ap_idle = 0;
    repeat (10) @(posedge clk);
    #1 chk(ap_start, "ap_start held while running");
    axil_read(6'h00, rd); chk(rd == 32'h1, "CTRL running");
    ap_done = 1; ap_ready = 1;
    @(posedge clk); #1;
    ap_done = 0; ap_ready = 0; ap_idle = 1;
    chk(!ap_start, "ap_start cleared by ap_ready");
    axil_read(6'h00, rd); chk(rd == 32'h6, "CTRL done + idle");
    axil_read(6'h00, rd); chk(rd == 32'h4, "done cleared on read");
    axil_read(6'h18, rd); chk(rd == 17, "STAMPS");
    axil_read(6'h1C, rd); chk(rd == 3, "DROPS");
    axil_read(6'h20, rd); chk(rd == 14, "WRITTEN");
    resp_err = 1;
    axil_read(6'h24, rd); chk(rd == 1, "STATUS");
    axil_read(6'h3C, rd); chk(rd == 0, "unmapped reads zero");
    axil_write(6'h18, 32'hFFFF, 0);
    axil_read(6'h18, rd); chk(rd == 17, "read-only STAMPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
