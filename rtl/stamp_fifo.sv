// stamp_fifo: timestamp buffer between the cycle counter and global memory.
//
// A synchronous first-in first-out buffer of DEPTH words of W bits, written
// as one memory array so that it maps onto block RAM (512 x 64 bits is one
// 36 Kb block RAM, matching the single block RAM the profiler occupies).
// Write: `wr_en` with `wr_data` stores a word unless the buffer is `full`.
// Read: `rd_en` while not `empty` pops a word; it appears on `rd_data` one
// clock later (registered block-RAM read). `clear` empties the buffer.
// `count` is the number of words held. Writes while full are ignored and
// reads while empty do nothing. Depth, width and the read latency are this
// design's choices; only "a buffer in one BRAM, flushed after the run" is
// given.
module stamp_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          full,
  output logic          empty,
  output logic [AW:0]   count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // Memory array: no reset, so it can be a block RAM.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
