// tb_prof_ctrl: takes the run controller through several complete runs
// with random run and flush lengths and checks each state, the one-cycle
// clear, flush_start and ap_done pulses, and that start is ignored while a
// run is in progress.
module tb_prof_ctrl;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0, ap_start = 0, finish = 0, flush_done = 0;
  logic ap_idle, ap_done, ap_ready, clear, run, flush_start;
  ctrl_state_e state;
  int checks = 0, failures = 0, runs = 0;

  prof_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk); #1;
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
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      int idle_len, run_len, flush_len;
      idle_len  = $urandom_range(0, 5);
      run_len   = $urandom_range(1, 30);
      flush_len = $urandom_range(1, 20);
      repeat (idle_len) begin
        chk(ap_idle && !run && !clear && !ap_done && state == ST_IDLE, "idle");
        @(posedge clk); #1;
      end
      ap_start = 1;
      #1 chk(clear && ap_idle, "clear on start");
      @(posedge clk); #1;
      repeat (run_len) begin
        chk(run && !clear && !ap_idle && !flush_start && state == ST_RUN, "running");
        @(posedge clk); #1;
      end
      finish = 1;
      @(posedge clk); #1;
      finish = 0;
      chk(state == ST_FLUSH && flush_start && !run, "flush start");
      repeat (flush_len) begin
        @(posedge clk); #1;
        chk(state == ST_FLUSH && !flush_start && !ap_done, "flushing");
      end
      flush_done = 1;
      @(posedge clk); #1;
      flush_done = 0;
      chk(ap_done && ap_ready && state == ST_DONE, "done pulse");
      ap_start = 0;
      @(posedge clk); #1;
      chk(!ap_done && ap_idle, "back to idle");
      runs++;
    end
    chk(runs == 10, "all runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
