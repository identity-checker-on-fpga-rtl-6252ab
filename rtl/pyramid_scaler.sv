// pyramid_scaler: streams one level of the image pyramid.
//
// Level L is the frame downscaled by 1.2^L. For each output pixel (x, y) of
// an lw x lh level, the scaler reads the frame pixel at
// (floor(x*s), floor(y*s)), s = scale_q16 / 65536 (nearest neighbour). The
// source coordinates are kept as Q16 accumulators that grow by scale_q16
// per step, so no multiplier is needed. One frame address is issued per
// cycle; the frame RAM answers one cycle later, when the pixel leaves on
// pix_valid with its level coordinates. pix_last marks the final pixel.
// `busy` is high from start until the last address has been issued.
//
// The 1.2 step between levels is the system's; nearest-neighbour sampling of
// the original frame (rather than of the previous level) is a choice made
// here. Pixel n of the level is on the stream n+1 cycles after start is
// taken, so a level of lw*lh pixels streams out in lw*lh cycles.
module pyramid_scaler
  import fd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [SCALE_W-1:0]  scale_q16,
  input  logic [7:0]          lw,
  input  logic [6:0]          lh,
  output logic                busy,
  // frame RAM read port (one-cycle latency)
  output logic [IMG_AW-1:0]   img_addr,
  input  logic [PIX_W-1:0]    img_data,
  // level pixel stream
  output logic                pix_valid,
  output logic [7:0]          pix_x,
  output logic [6:0]          pix_y,
  output logic [PIX_W-1:0]    pix_data,
  output logic                pix_last
);
  logic [7:0]          x;
  logic [6:0]          y;
  logic [SCALE_W+7:0]  sx_acc;   // x*s in Q16
  logic [SCALE_W+6:0]  sy_acc;   // y*s in Q16
  logic [6:0]          src_y;
  logic [7:0]          src_x;
  logic                rd_pending, rd_last;
  logic [7:0]          rd_x;
  logic [6:0]          rd_y;

  assign src_x    = sx_acc[16 +: 8];
  assign src_y    = sy_acc[16 +: 7];
  assign img_addr = IMG_AW'(src_y) * IMG_AW'(IMG_W) + IMG_AW'(src_x);

  assign pix_valid = rd_pending;
  assign pix_x     = rd_x;
  assign pix_y     = rd_y;
  assign pix_data  = img_data;
  assign pix_last  = rd_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      x          <= '0;
      y          <= '0;
      sx_acc     <= '0;
      sy_acc     <= '0;
      rd_pending <= 1'b0;
      rd_last    <= 1'b0;
      rd_x       <= '0;
      rd_y       <= '0;
    end else begin
      rd_pending <= 1'b0;
      rd_last    <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        x      <= '0;
        y      <= '0;
        sx_acc <= '0;
        sy_acc <= '0;
      end else if (busy) begin
        // address for (x, y) is on img_addr this cycle
        rd_pending <= 1'b1;
        rd_x       <= x;
        rd_y       <= y;
        if (x == lw - 1'b1) begin
          x      <= '0;
          sx_acc <= '0;
          if (y == lh - 1'b1) begin
            busy    <= 1'b0;
            rd_last <= 1'b1;
          end else begin
            y      <= y + 1'b1;
            sy_acc <= sy_acc + (SCALE_W+7)'(scale_q16);
          end
        end else begin
          x      <= x + 1'b1;
          sx_acc <= sx_acc + (SCALE_W+8)'(scale_q16);
        end
      end
    end
  end
endmodule
