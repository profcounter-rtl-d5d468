// cycle_counter: the free-running cycle counter of the profiler kernel.
//
// It counts clock cycles while `en` is high and is set back to zero by a
// one-cycle `clear` (given when the kernel is started). `count` is the
// registered value; reset (`rst_n`, active low, synchronous) also zeroes it; a timestamp taken in a cycle reads the value it shows in
// that cycle. `clear` wins over `en`. The counter never stops or waits on the
// command pipe, which is what makes the cycle count exact; it wraps at 2^W.
// The 64-bit default follows the `long` type of the counter in the profiler's
// kernel; the clear/enable interface is this design's own.
module cycle_counter #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (en)     count <= count + 1'b1;
  end

endmodule
