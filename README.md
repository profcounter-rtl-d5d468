# profcounter — a line-level cycle counter for HLS kernels

High-level synthesis tools report the latency of a whole kernel, and their
static estimates miss what depends on run-time behaviour: data-dependent loop
bounds, off-chip memory, extra states the tool inserts. `profcounter` measures
the real number of clock cycles between chosen points inside a running
kernel. The kernel under test (KUT) writes a short command word into a stream
pipe at each point of interest; a separate profiler kernel, this RTL, records
the value of a free-running cycle counter at the moment each word arrives.
Subtracting two records gives the latency of the code between them, to the
cycle.

Two properties make the measurement exact and cheap:

* **The pipe never blocks.** The profiler accepts a command in every cycle it
  is running, and its counter advances every clock whether or not a command
  arrives. A KUT writing a stamp therefore never waits, and the count is not
  disturbed by the pipe. A profiler written in HLS could not do this because
  its pipe read would stall its loop; that is why this part is RTL.
* **Nothing touches global memory during the run.** Timestamps go into an
  on-chip buffer. The buffer is copied to memory only after the KUT has
  sent FINISH, so the profiler never competes with the KUT for memory
  bandwidth while the KUT is being measured.

## Using it from a kernel

The KUT sends these 32-bit commands (layout `{id[15:0], op[15:0]}`, see
`rtl/prof_pkg.sv`):

| op | name | effect |
|----|------|--------|
| 0 | `COMM_NOP` | nothing |
| 1 | `COMM_STAMP` | record the current cycle count |
| 3 | `COMM_CHECKPOINT` | record the count together with `id` (identified stamp) |
| 2 | `COMM_FINISH` | end the run, close the pipe, write the log out |

Any other opcode is treated as NOP. Identified checkpoints are for code whose
control flow makes it hard to tell which plain stamp produced which record:
put a different ID at each place.

A typical use wraps a loop:

    STAMP ; for (...) { body } ; STAMP ; FINISH

and the loop latency is `log[1] - log[0]`.

## The log

After the run, global memory holds `log[0..n-1]`, consecutive 64-bit words
starting at the address passed as the kernel's argument, in the order the
commands arrived. Each word is

| bits | content |
|------|---------|
| 63 | 1 for a checkpoint, 0 for a plain stamp |
| 62:48 | checkpoint ID (low 15 bits of `id`); 0 for a plain stamp |
| 47:0 | cycle count |

48 bits of count last about ten days at 300 MHz, so the count does not wrap
in practice. `n` can be read from the `STAMPS` register.

## What a timestamp means

Count 0 is the first cycle after the start: the cycle in which the pipe first
shows ready. A command word offered `k` cycles after that is accepted in that
same cycle and records `k`. Two back-to-back commands therefore record values
one apart.

Because each stamp records the cycle it is accepted in, the difference of two
stamps includes every cycle of the code between them, *including* the cycle
in which a loop tests its exit condition and leaves. Static HLS estimates
usually leave that cycle out, so expect a measurement one cycle larger per
loop than the tool's estimate, and larger still when the tool adds
load states before an unrolled loop that its estimate does not count.

## A run, as the host sees it

`s_axi_control` is a 32-bit AXI4-Lite slave (`rtl/ctrl_regs.sv`):

| offset | register | access |
|--------|----------|--------|
| 0x00 | CTRL: bit0 ap_start, bit1 ap_done (cleared when read), bit2 ap_idle, bit3 ap_ready | bit0 write-1, rest read |
| 0x10 | log address, low 32 bits | read/write |
| 0x14 | log address, high 32 bits | read/write |
| 0x18 | STAMPS: records stored in the last run | read |
| 0x1C | DROPS: records lost because the buffer was full | read |
| 0x20 | WRITTEN: words written to memory | read |
| 0x24 | STATUS: bit0 set if a memory write got an error response | read |

1. Write the log address to 0x10/0x14, then write 1 to CTRL. `ap_start` stays
   set until the kernel finishes.
2. The controller (`rtl/prof_ctrl.sv`) leaves IDLE, clears the counter, the
   buffer and the status counters, and enters RUN: the counter counts and
   the pipe is open. Start the KUT at the same time.
3. FINISH from the KUT moves to FLUSH. The pipe's ready drops and stays low.
4. The log writer copies the buffer to memory; then DONE lasts one cycle,
   `ap_done` is latched in CTRL and the kernel returns to IDLE.
5. Poll CTRL until bit1 is set, then read the log and the status registers.

Commands offered before the start or after FINISH are not accepted (ready is
low), so the KUT's pipe writer waits there, as an ordinary stream would.

## Buffer and overflow

The buffer (`rtl/stamp_fifo.sv`) is 512 entries of 64 bits, one 36 Kb block
RAM. It is written only during RUN and read only during FLUSH. When it is
full, further stamps are dropped, not stalled: stalling would delay the KUT
and falsify the very latency being measured. Each dropped stamp is counted
in DROPS, and the log holds the first 512 records. Change `DEPTH` on
`profcounter` for longer traces.

## Flush to global memory

`rtl/log_writer.sv` is an AXI4 write master on the `m_axi_gmem_aw/w/b`
ports, 64-bit data. It writes one word per transaction (AWLEN 0, AWSIZE 3,
INCR, all strobes), with address and data offered together and one write
outstanding, and waits for each response before popping the next entry.
This is slow, about four cycles per word at best, but the flush happens after
the measurement and is not part of any timestamp. No read channels are
brought out because the profiler never reads memory.

## Structure

    s_axi_control ──► ctrl_regs ──ap_start/log addr──► prof_ctrl ──clear/run──► cycle_counter
                          ▲                               │   ▲                       │ count
                          │ status counters   flush_start │   │ finish                ▼
    s_axis_cmd ─────────────────────────────────────────────► cmd_decoder ──push/entry──► stamp_fifo
                                                          ▼                                │
    m_axi_gmem ◄──────────────────────────────────── log_writer ◄─────────── pop ──────────┘

| file | role |
|------|------|
| `rtl/prof_pkg.sv` | command, opcode, log-entry and state types |
| `rtl/profcounter.sv` | top; wires the blocks, holds the cross-block assertions |
| `rtl/ctrl_regs.sv` | AXI4-Lite registers |
| `rtl/prof_ctrl.sv` | IDLE → RUN → FLUSH → DONE control |
| `rtl/cycle_counter.sv` | 64-bit counter |
| `rtl/cmd_decoder.sv` | non-blocking pipe receiver, builds log entries, counts stores and drops |
| `rtl/stamp_fifo.sv` | timestamp buffer |
| `rtl/log_writer.sv` | AXI4 write master for the flush |

All logic is on one clock, `ap_clk`, with a synchronous active-low reset,
`ap_rst_n`. Top parameters: `DEPTH` (512), `CNT_W` (64), `ADDR_W` (64).

The default build has about 470 flip-flop bits and one 32 Kb memory. That is
in line with a profiler of this kind, which needs around 500 flip-flops and
one block RAM. The cost does not grow with the KUT or with the number of
stamp points in it, since every point shares the one pipe.

## Where this design makes its own choices

The scheme is fixed: a non-blocking pipe, a free-running counter, an on-chip
buffer flushed after FINISH, and plain and identified stamps. The details
below are this implementation's own:

* opcode values, the command layout and the log-entry format (flag, 15-bit
  ID, 48-bit count);
* the buffer depth of 512, and dropping stamps when the buffer is full;
* the register map beyond CTRL at 0x00 and the argument at 0x10, and the
  status registers; there are no interrupt registers, so the host polls;
* single-beat AXI4 writes for the flush, and write channels only;
* the clear/enable and start/done handshakes between the blocks, and the
  reset convention.

In the kernel-under-test framework, the stamp commands in the KUT source are
kept as placeholders through the HLS tool's control-flow optimisation and
become real pipe writes only before scheduling, so that stamping does not
change the KUT's schedule. That is a matter for the compiler flow, not the
hardware, and is not part of this RTL. The same goes for the KUT itself, the
memory, the vendor shell and the host.

## Verification

Each block has a self-checking testbench in `tb/` that compares against a
model written independently in the testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_cycle_counter` | random clear/enable against a reference count, wrap-around at 8 bits |
| `tb_cmd_decoder` | random commands, gaps and full buffer: ready, push, entry fields, counters, pipe closed after FINISH |
| `tb_stamp_fifo` | random push/pop against a queue at depth 8: order, latency, full, empty, count, clear |
| `tb_log_writer` | flushes of 0, 12, 37 and 200 words under random back-pressure; addresses, data, count, error flag |
| `tb_prof_ctrl` | ten runs of random length: states and one-cycle pulses |
| `tb_ctrl_regs` | host-style register traffic, write address/data in either order, start/done semantics |
| `tb_profcounter` | end to end at the default size, see below |

`tb_profcounter` runs the whole kernel with a host model, a vector-add style
KUT model and an AXI memory model with random stalls (`tb/axi_wr_mem_model.sv`).
It makes three runs. The first has a stamp, a 20-iteration loop with one
checkpoint per iteration, NOPs, idle gaps and back-to-back stamps, then a
closing stamp. Every log word is checked, and the outer stamps' difference
must equal the modelled loop latency. The second run sends 521 stamps into
the 512-entry buffer and checks the drops. The third gets an error response
from memory. It counts each mechanism (stamp, checkpoint, NOP, idle pipe,
back-to-back commands, overflow, memory stall, error response, closed pipe,
restart) and fails if one never occurs. Each testbench prints
`TB_RESULT checks=N failures=M`.

Two further testbenches replay realistic measurements at full length
through `tb/prof_env.sv`, which holds the kernel, the memory model and the
host and KUT tasks:

* `tb_workloads_polybench`: nine small linear-algebra and convolution
  kernels (atax, bicg, conv2d, conv3d, gemm, gesummv, mvt, syr2k, syrk),
  each with loop unrolling off and on, with computation regions from 38,053
  to 29,393,153 cycles. Each run has two nested regions, copy-in +
  computation + copy-out and the computation alone, and the test checks
  the four log words and both differences. It also prints how far each
  measurement lies above the HLS tool's static estimate for the same
  kernel. That gap is 1 cycle per loop (the uncounted exit test), and up
  to 130 cycles for unrolled kernels whose schedule loads operands before
  the loop. For example, the unrolled bicg has 128 such load states plus
  two loop exits.
* `tb_workloads_bfs`: a breadth-first search with data-dependent loops,
  about 49.7 M cycles per run. It uses 100 outer iterations, with
  checkpoint IDs 1 and 2 around an inner loop that takes either 1 cycle
  (exit test only) or 407 cycles (one iteration). The test checks each
  record's flag, ID and count.

These take about one minute each at roughly 2 M simulated cycles per
second.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/prof_pkg.sv tb/tb_profcounter.sv --top-module tb_profcounter -o sim
    ./obj_dir/sim

Replace `tb_profcounter` with any other testbench name. Each finishes in well
under a second.
