// image_buffer: block RAM holding one 160x120 8-bit grayscale frame.
//
// Bytes arriving from the UART receiver (wr_valid/wr_data) are written in
// raster order, row 0 first, at a write pointer that counts up from 0. After
// the last of IMG_W*IMG_H pixels the pointer wraps to 0 and `frame_ready`
// pulses for one cycle, one cycle after that pixel's wr_valid. `clear` puts
// the pointer back to 0 (used to resynchronise to a frame boundary).
//
// The read port is synchronous: rd_data holds the pixel at rd_addr one cycle
// after the address is presented, as a block RAM read does.
//
// The frame size and the one-byte-per-pixel raster transfer follow the
// system description; the pointer/strobe interface is a choice made here.
module image_buffer
  import fd_pkg::*;
#(
  parameter int W = IMG_W,
  parameter int H = IMG_H
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         wr_valid,
  input  logic [PIX_W-1:0]             wr_data,
  output logic                         frame_ready,
  input  logic [$clog2(W*H)-1:0]       rd_addr,
  output logic [PIX_W-1:0]             rd_data
);
  localparam int N  = W * H;
  localparam int AW = $clog2(N);

  logic [PIX_W-1:0] mem [N];
  logic [AW-1:0]    wr_ptr;

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wr_ptr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr      <= '0;
      frame_ready <= 1'b0;
    end else begin
      frame_ready <= 1'b0;
      if (wr_valid) begin
        if (wr_ptr == AW'(N - 1)) begin
          wr_ptr      <= '0;
          frame_ready <= 1'b1;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
    end
  end
endmodule
