// rect_fifo: small synchronous FIFO that queues face rectangles between the
// detector and the UART transmitter.
//
// DEPTH entries of type T in a circular buffer with read and write pointers
// and an occupancy count. A push is taken when !full, a pop when !empty;
// both may happen in the same cycle. dout shows the oldest entry whenever
// empty is low (first-word fall-through), so a pop consumes it.
//
// A rectangle queue is part of the system; its depth of 4 is a choice made
// here (one rectangle per frame, and a frame takes far longer to arrive than
// a rectangle takes to leave).
module rect_fifo
  import fd_pkg::*;
#(
  parameter int  DEPTH = 4,
  parameter type T     = face_rect_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  output logic full,
  input  logic pop,
  output T     dout,
  output logic empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T               mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic [AW:0]    count;
  logic           do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == 0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
