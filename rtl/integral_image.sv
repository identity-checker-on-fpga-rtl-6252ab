// integral_image: turns a raster pixel stream into its integral image.
//
// II(x, y) is the sum of all pixels at or above row y and at or left of
// column x. It is built as II(x, y) = II(x, y-1) + rowsum(x, y), where the
// running row sum restarts at x = 0 and II(x, y-1) comes from a line buffer
// holding the previous row of integral values. Each input pixel produces one
// write, registered one cycle later, to an external integral RAM at address
// y*IMG_W + x, so every level uses the same row pitch. ii_last marks the
// write of the level's final pixel. One pixel per cycle, no stalls.
//
// A rectangle sum is then four reads: II(D) + II(A) - II(B) - II(C) for the
// corners of the rectangle, as the system describes. The line-buffer method
// and the 23-bit width (enough for 160*120*255) are choices made here.
module integral_image
  import fd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pix_valid,
  input  logic [7:0]          pix_x,
  input  logic [6:0]          pix_y,
  input  logic [PIX_W-1:0]    pix_data,
  input  logic                pix_last,
  output logic                ii_we,
  output logic [IMG_AW-1:0]   ii_waddr,
  output logic [II_W-1:0]     ii_wdata,
  output logic                ii_last
);
  logic [II_W-1:0] line_buf [IMG_W];   // integral values of the previous row
  logic [II_W-1:0] row_sum;
  logic [II_W-1:0] rs_next, ii_next, above;

  always_comb begin
    rs_next = ((pix_x == 0) ? '0 : row_sum) + II_W'(pix_data);
    above   = (pix_y == 0) ? '0 : line_buf[pix_x];
    ii_next = above + rs_next;
  end

  always_ff @(posedge clk) begin
    if (pix_valid) line_buf[pix_x] <= ii_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_sum  <= '0;
      ii_we    <= 1'b0;
      ii_waddr <= '0;
      ii_wdata <= '0;
      ii_last  <= 1'b0;
    end else begin
      ii_we   <= pix_valid;
      ii_last <= pix_valid && pix_last;
      if (pix_valid) begin
        row_sum  <= rs_next;
        ii_waddr <= IMG_AW'(pix_y) * IMG_AW'(IMG_W) + IMG_AW'(pix_x);
        ii_wdata <= ii_next;
      end
    end
  end
endmodule
