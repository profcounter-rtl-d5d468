// tb_workloads_bfs: a breadth-first-search style kernel with data-dependent
// loops, measured with identified checkpoints. The computation region is
// bracketed by plain stamps and lasts the published measured count
// (49707181 cycles without unrolling, 49230850 with). Inside it, 100
// outer-loop iterations each wrap the inner loop in CHECKPOINT 1 and
// CHECKPOINT 2; the inner loop takes either 1 cycle (no iteration, only the
// exit test) or 407 cycles (one iteration), the two values published for
// this kernel, chosen per iteration at random. The rest of each outer
// iteration is padding that makes the region total come out right. Checks:
// every log word (flag, ID, count), each inner latency and the total.
module tb_workloads_bfs;
  import prof_pkg::*;
  prof_env env();

  localparam int ITERS = 100;
  longint total[2] = '{49707181, 49230850};
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(64'd10 * 64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    env.reset();
    for (int r = 0; r < 2; r++) begin
      longint s0, s_end, a[ITERS], b[ITERS], lat[ITERS];
      longint pad, w_end, used, got;
      int n1, n407;
      logic [63:0] base;
      base = 64'h0000_0000_2000_0000 + 64'(r) * 64'h10_0000;
      used = 0; n1 = 0; n407 = 0;
      for (int i = 0; i < ITERS; i++) begin
        lat[i] = ($urandom_range(0, 1) == 1 || i == 0) ? 407 : 1;
        if (i == 1) lat[i] = 1;
        used += lat[i] + 1;
      end
      pad   = (total[r] - 1 - used) / ITERS;
      w_end = total[r] - 1 - used - pad * ITERS;
      fork
        env.host_start(base);
        begin
          env.wait_open();
          env.idle(5);
          env.send(COMM_STAMP, 0, s0);
          for (int i = 0; i < ITERS; i++) begin
            env.idle(pad);
            env.send(COMM_CHECKPOINT, 16'd1, a[i]);
            env.idle(lat[i] - 1);
            env.send(COMM_CHECKPOINT, 16'd2, b[i]);
          end
          env.idle(w_end);
          env.send(COMM_STAMP, 0, s_end);
          begin longint f; env.send(COMM_FINISH, 0, f); end
        end
      join
      env.host_wait_done(5000);
      chk(env.log_word(base, 0) == {16'd0, 48'(s0)}, "first stamp");
      for (int i = 0; i < ITERS; i++) begin
        logic [63:0] wa, wb;
        wa = env.log_word(base, 1 + 2 * i);
        wb = env.log_word(base, 2 + 2 * i);
        chk(wa == {1'b1, 15'd1, 48'(a[i])}, $sformatf("checkpoint 1 of iteration %0d: %h", i, wa));
        chk(wb == {1'b1, 15'd2, 48'(b[i])}, $sformatf("checkpoint 2 of iteration %0d: %h", i, wb));
        got = longint'(wb[47:0]) - longint'(wa[47:0]);
        chk(got == lat[i], $sformatf("inner loop %0d: %0d cycles, expected %0d", i, got, lat[i]));
        if (got == 1) n1++;
        if (got == 407) n407++;
      end
      chk(env.log_word(base, 2 * ITERS + 1) == {16'd0, 48'(s_end)}, "last stamp");
      got = longint'(env.log_word(base, 2 * ITERS + 1) & 64'hFFFF_FFFF_FFFF) -
            longint'(env.log_word(base, 0) & 64'hFFFF_FFFF_FFFF);
      chk(got == total[r], $sformatf("computation %0d expected %0d", got, total[r]));
      chk(n1 > 0 && n407 > 0, "both inner-loop latencies seen");
      env.reg_read(6'h18, v); chk(v == 2 * ITERS + 2, "STAMPS register");
      env.reg_read(6'h20, v); chk(v == 2 * ITERS + 2, "WRITTEN register");
      $display("bfs run %0d: computation %0d cycles; inner loop 1 cycle x%0d, 407 cycles x%0d",
               r, got, n1, n407);
    end
    chk(env.not_ready == 0, "every command accepted in the cycle it was offered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
