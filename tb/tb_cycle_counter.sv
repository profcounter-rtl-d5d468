// tb_cycle_counter: checks the cycle counter against a reference count
// under random clear/enable, including wrap-around at a small width and the
// count held while disabled.
module tb_cycle_counter;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] count, ref_count;
  int checks = 0, failures = 0;
  bit wrapped = 0;

  cycle_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_count = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check();
    for (int i = 0; i < 1000; i++) begin
      clear = (i > 600) && ($urandom_range(0, 99) < 2);
      en    = (i < 600) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clear) ref_count = '0;
      else if (en) begin
        if (ref_count == '1) wrapped = 1;
        ref_count = ref_count + 1'b1;
      end
      #1 check();
    end
    checks++;
    if (!wrapped) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (count !== ref_count) begin
      failures++;
      $display("mismatch: count=%0d expected %0d", count, ref_count);
    end
  endtask
endmodule
