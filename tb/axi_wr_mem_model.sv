// axi_wr_mem_model: behavioural model of global memory seen through the
// AXI4 write channels, for testbenches only. It accepts single-beat writes,
// with AWREADY and WREADY each held low at random (READY_PCT percent high)
// to exercise back-pressure, stores each 64-bit word in an associative
// array by byte address, and answers with one B response per write after a
// random delay. A write to ERR_ADDR is answered SLVERR. `n_stalls` counts
// cycles in which a VALID waited for its READY.
module axi_wr_mem_model #(
  parameter int unsigned READY_PCT = 60,
  parameter logic [63:0] ERR_ADDR  = '1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  output int          n_writes,
  output int          n_stalls,
  output int          n_bad_bursts
);
  logic [63:0] mem [logic [63:0]];
  logic [63:0] a_q[$];
  logic [63:0] d_q[$];
  int          b_pending = 0;

  function automatic logic [63:0] read_word(input logic [63:0] addr);
    return mem.exists(addr) ? mem[addr] : 64'hDEAD_BEEF_DEAD_BEEF;
  endfunction

  function automatic bit has_word(input logic [63:0] addr);
    return mem.exists(addr);
  endfunction

  function automatic void erase();
    mem.delete();
  endfunction

  initial begin
    awready = 0; wready = 0; bvalid = 0; bresp = 2'b00;
    n_writes = 0; n_stalls = 0; n_bad_bursts = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      awready <= 0; wready <= 0; bvalid <= 0;
    end else begin
      if (awvalid && !awready) n_stalls++;
      if (wvalid && !wready) n_stalls++;
      if (awvalid && awready) begin
        a_q.push_back(awaddr);
        if (awlen != 0) n_bad_bursts++;
      end
      if (wvalid && wready) begin
        d_q.push_back(wdata);
        if (!wlast) n_bad_bursts++;
      end
      while (a_q.size() > 0 && d_q.size() > 0) begin
        logic [63:0] a;
        a = a_q.pop_front();
        mem[a] = d_q.pop_front();
        n_writes++;
        b_pending++;
        if (a == ERR_ADDR) b_pending += 1000;  // marks an error response
      end
      awready <= ($urandom_range(0, 99) < READY_PCT);
      wready  <= ($urandom_range(0, 99) < READY_PCT);
      if (bvalid && bready) bvalid <= 0;
      else if (!bvalid && b_pending > 0 && $urandom_range(0, 2) == 0) begin
        bvalid <= 1;
        if (b_pending >= 1000) begin bresp <= 2'b10; b_pending -= 1001; end
        else begin bresp <= 2'b00; b_pending--; end
      end
    end
  end
endmodule
