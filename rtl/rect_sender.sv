// rect_sender: returns face rectangles to the host as UART bytes.
//
// When the queue is not empty and the sender is idle it copies the head
// rectangle and pops it, then offers four bytes to the UART transmitter in
// the order x, y, w, h, each on tx_valid until tx_ready accepts it. A
// rectangle with w = h = 0 is the "no face" answer.
//
// Sending the face coordinates back over UART is the system's; the byte
// order and framing (no header, four bytes) are choices made here.
module rect_sender
  import fd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  face_rect_t  rect,
  input  logic        empty,
  output logic        pop,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready
);
  face_rect_t  cur;
  logic [1:0]  idx;
  logic        active;

  assign pop      = !active && !empty;
  assign tx_valid = active;

  always_comb begin
    unique case (idx)
      2'd0: tx_data = cur.x;
      2'd1: tx_data = cur.y;
      2'd2: tx_data = cur.w;
      default: tx_data = cur.h;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur    <= '0;
      idx    <= '0;
      active <= 1'b0;
    end else if (!active) begin
      if (!empty) begin
        cur    <= rect;
        idx    <= '0;
        active <= 1'b1;
      end
    end else if (tx_ready) begin
      idx <= idx + 1'b1;
      if (idx == 2'd3) active <= 1'b0;
    end
  end
endmodule
