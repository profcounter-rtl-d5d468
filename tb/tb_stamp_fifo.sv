// tb_stamp_fifo: random writes and reads against a queue model, at a small
// depth so that full and empty are both reached; checks data order, the
// one-cycle read latency, count, full/empty and clear.
module tb_stamp_fifo;
  localparam int unsigned W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] q[$];
  logic [W-1:0] expect_data;
  bit pending = 0;
  int checks = 0, failures = 0, n_full = 0, n_empty_reads = 0;

  stamp_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      bit rd, wr;
      phase = (i / 200) % 3;   // write-heavy, read-heavy, mixed
      wr_en   = $urandom_range(0, 9) < (phase == 0 ? 8 : phase == 1 ? 2 : 5);
      rd_en   = $urandom_range(0, 9) < (phase == 0 ? 2 : phase == 1 ? 8 : 5);
      clear   = (i == 1500);
      wr_data = W'($urandom);
      #1;
      chk(full == (q.size() == DEPTH), "full flag");
      chk(empty == (q.size() == 0), "empty flag");
      chk(int'(count) == q.size(), "count");
      if (full) n_full++;
      if (rd_en && empty) n_empty_reads++;
      @(posedge clk);
      if (clear) begin
        q.delete();
        pending = 0;
      end else begin
        rd = rd_en && (q.size() != 0);
        wr = wr_en && (q.size() != DEPTH);
        if (rd) expect_data = q.pop_front();
        if (wr) q.push_back(wr_data);
        pending = rd;
      end
      #1;
      if (pending) chk(rd_data == expect_data, "read data");
    end
    chk(n_full > 0, "full reached");
    chk(n_empty_reads > 0, "read while empty exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
