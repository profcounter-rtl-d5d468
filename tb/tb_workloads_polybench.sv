// tb_workloads_polybench: replays the measurements of nine PolyBench-style
// kernels (atax, bicg, conv2d, conv3d, gemm, gesummv, mvt, syr2k, syrk),
// each with loop unrolling disabled and enabled, through the profiler at
// its default size. Each kernel model uses two profiling regions: an outer
// one around the local-buffer copy-in, the computation and the copy-out,
// and an inner one around the computation alone, whose length is the
// published measured cycle count. The copy lengths are arbitrary. After
// each run the testbench checks that the log holds exactly the four
// expected timestamps, that the inner difference equals the measured count
// and that no stamp was refused. It also prints how far that count lies
// above the static estimate of the HLS tool, as published (1 cycle per loop
// without unrolling; more for some unrolled kernels).
module tb_workloads_polybench;
  import prof_pkg::*;
  prof_env env();

  typedef struct {
    string  name;
    longint estimate;   // static HLS estimate of the computation
    longint measured;   // measured computation cycles
  } wl_t;

  localparam int N = 18;
  wl_t wl[N];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(64'd10 * 64'd400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl[0]  = '{"atax",        147712,   147713};
    wl[1]  = '{"bicg",        656384,   656386};
    wl[2]  = '{"conv2d",      603540,   603541};
    wl[3]  = '{"conv3d",     1675860,  1675861};
    wl[4]  = '{"gemm",      25280768, 25280769};
    wl[5]  = '{"gesummv",     164608,   164609};
    wl[6]  = '{"mvt",         655872,   655873};
    wl[7]  = '{"syr2k",     29393152, 29393153};
    wl[8]  = '{"syrk",      27377920, 27377921};
    wl[9]  = '{"atax-u",       66304,    66369};
    wl[10] = '{"bicg-u",      263936,   264066};
    wl[11] = '{"conv2d-u",     38052,    38053};
    wl[12] = '{"conv3d-u",    156660,   156661};
    wl[13] = '{"gemm-u",     8495744,  8495745};
    wl[14] = '{"gesummv-u",    66816,    66881};
    wl[15] = '{"mvt-u",       263680,   263809};
    wl[16] = '{"syr2k-u",   16883968, 16883969};
    wl[17] = '{"syrk-u",     8495744,  8495745};
  end

  initial begin
    logic [31:0] v;
    env.reset();
    for (int w = 0; w < N; w++) begin
      longint s[4];
      longint copy_in, copy_out, got_inner, got_outer;
      logic [63:0] base;
      base = 64'h0000_0000_1000_0000 + 64'(w) * 64'h1000;
      copy_in  = 200 + 37 * w;
      copy_out = 100 + 11 * w;
      fork
        env.host_start(base);
        begin
          env.wait_open();
          env.idle(3);
          env.send(COMM_STAMP, 0, s[0]);        // outer region begins
          env.idle(copy_in);
          env.send(COMM_STAMP, 0, s[1]);        // computation begins
          env.idle(wl[w].measured - 1);
          env.send(COMM_STAMP, 0, s[2]);        // computation ends
          env.idle(copy_out);
          env.send(COMM_STAMP, 0, s[3]);        // outer region ends
          begin longint f; env.send(COMM_FINISH, 0, f); end
        end
      join
      env.host_wait_done(2000);
      for (int i = 0; i < 4; i++)
        chk(env.log_word(base, i) == {16'd0, 48'(s[i])},
            $sformatf("%s log word %0d: %h expected %0d", wl[w].name, i, env.log_word(base, i), s[i]));
      chk(env.log_word(base, 4) == 64'hDEAD_BEEF_DEAD_BEEF, {wl[w].name, ": nothing past the log"});
      got_inner = longint'(env.log_word(base, 2) & 64'hFFFF_FFFF_FFFF) -
                  longint'(env.log_word(base, 1) & 64'hFFFF_FFFF_FFFF);
      got_outer = longint'(env.log_word(base, 3) & 64'hFFFF_FFFF_FFFF) -
                  longint'(env.log_word(base, 0) & 64'hFFFF_FFFF_FFFF);
      chk(got_inner == wl[w].measured, $sformatf("%s computation %0d expected %0d",
                                                 wl[w].name, got_inner, wl[w].measured));
      chk(got_outer == wl[w].measured + copy_in + copy_out + 2, {wl[w].name, ": outer region"});
      env.reg_read(6'h18, v); chk(v == 4, {wl[w].name, ": STAMPS register"});
      env.reg_read(6'h1C, v); chk(v == 0, {wl[w].name, ": DROPS register"});
      $display("%-10s computation %9d cycles, static estimate %9d, above estimate by %0d",
               wl[w].name, got_inner, wl[w].estimate, got_inner - wl[w].estimate);
    end
    chk(env.not_ready == 0, "every command accepted in the cycle it was offered");
    chk(env.n_bad == 0, "single-beat writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
