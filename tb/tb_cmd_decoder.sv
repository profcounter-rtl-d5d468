// tb_cmd_decoder: offers random command words (NOP, STAMP, CHECKPOINT with
// random IDs, unknown opcodes, FINISH) with random gaps and a randomly full
// buffer, and checks every cycle the pipe ready, the entry written and its
// fields, the drop and stamp counters and that the pipe closes after FINISH
// until the next clear.
module tb_cmd_decoder;
  import prof_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, run = 0;
  logic s_tvalid = 0, s_tready;
  logic [CMD_W-1:0] s_tdata = '0;
  logic [63:0] cycle = '0;
  logic buf_full = 0, push, finish, finished;
  log_entry_t entry;
  logic [31:0] n_stamps, n_dropped;
  int checks = 0, failures = 0;
  int ref_stamps = 0, ref_drops = 0, n_chk = 0, n_fin = 0;
  bit ref_fin = 0;

  cmd_decoder #(.CNT_W(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    for (int i = 0; i < 4000; i++) begin
      int r;
      logic [15:0] op, id;
      bit rdy, acc, stp;
      r = $urandom_range(0, 99);
      clear    = (i % 700 == 0);
      run      = !clear && ((i % 700) < 650);
      buf_full = ($urandom_range(0, 9) == 0);
      s_tvalid = $urandom_range(0, 2) != 0;
      id       = 16'($urandom);
      op = (r < 40) ? COMM_STAMP : (r < 70) ? COMM_CHECKPOINT :
           (r < 85) ? COMM_NOP : (r < 97) ? 16'(4 + $urandom_range(0, 100)) : COMM_FINISH;
      s_tdata  = {id, op};
      cycle    = {$urandom, $urandom};
      #1;
      begin
        rdy = run && !ref_fin;
        acc = rdy && s_tvalid;
        stp = acc && (op == COMM_STAMP || op == COMM_CHECKPOINT);
        chk(s_tready == rdy, "tready");
        chk(push == (stp && !buf_full), "push");
        chk(finish == (acc && op == COMM_FINISH), "finish pulse");
        if (push) begin
          chk(entry.cycle == cycle[47:0], "entry cycle");
          chk(entry.is_checkpoint == (op == COMM_CHECKPOINT), "entry flag");
          chk(entry.id == ((op == COMM_CHECKPOINT) ? id[14:0] : 15'd0), "entry id");
          if (op == COMM_CHECKPOINT) n_chk++;
        end
        chk(n_stamps == ref_stamps && n_dropped == ref_drops, $sformatf("counters i=%0d %0d/%0d %0d/%0d", i, n_stamps, ref_stamps, n_dropped, ref_drops));
        chk(finished == ref_fin, $sformatf("finished flag i=%0d f=%0d ref=%0d", i, finished, ref_fin));
        @(posedge clk);
        if (clear) begin ref_fin = 0; ref_stamps = 0; ref_drops = 0; end
        else begin
          if (stp && !buf_full) ref_stamps++;
          if (stp && buf_full) ref_drops++;
          if (acc && op == COMM_FINISH) begin ref_fin = 1; n_fin++; end
        end
        #1;
      end
    end
    chk(n_chk > 0 && n_fin > 1, "checkpoints and finishes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
