// sync_fifo: single-clock first-in first-out buffer.
//
// Holds up to DEPTH words of WIDTH bits in a register array with separate
// read and write pointers and an occupancy counter. A push when full is
// refused (the word is lost) and reported by overflow for one clock; a pop
// when empty does nothing. A push and a pop in the same clock are both
// carried out, also when the buffer is full (the pop makes room).
//
// The acquisition system buffers latched angle samples on their way to
// the serial output in a FIFO of unstated capacity; the depth default, the
// show-ahead read port and the overflow policy are this design's choices.
//
// Timing: rd_data always shows the oldest word (show-ahead); a pushed word
// is visible at rd_data one clock after the push when the buffer was
// empty.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow,  // push refused this clock
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty    = (level == '0);
  assign full     = (level == LW'(DEPTH));
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign overflow = push && !do_push;
  assign rd_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      level <= level + LW'(do_push) - LW'(do_pop);
    end
  end

  // Storage has no reset; only written entries are ever read.
  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) level <= LW'(DEPTH));

endmodule
