// tb_integral_image: streams random images of several sizes (with idle
// cycles between pixels) into the integral unit, captures its RAM writes
// and compares every value with a sum computed directly from the pixels.
// Also checks the write addresses (y*160+x), the one-cycle latency and the
// last flag.
module tb_integral_image;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_last = 0;
  logic [7:0] pix_x = 0, pix_data = 0;
  logic [6:0] pix_y = 0;
  logic ii_we, ii_last;
  logic [IMG_AW-1:0] ii_waddr;
  logic [II_W-1:0] ii_wdata;
  int checks = 0, failures = 0;
  longint cap [IMG_W * IMG_H];
  int nwrites, nlast;
  int img [IMG_H][IMG_W];

  integral_image dut (.clk, .rst_n, .pix_valid, .pix_x, .pix_y, .pix_data, .pix_last,
                      .ii_we, .ii_waddr, .ii_wdata, .ii_last);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ii_we) begin
    cap[ii_waddr] = longint'(ii_wdata);
    nwrites++;
    if (ii_last) nlast++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int sizes [4][2] = '{'{160, 120}, '{37, 29}, '{24, 24}, '{93, 70}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      automatic int w = sizes[t][0], h = sizes[t][1], bad = 0;
      nwrites = 0; nlast = 0;
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++)
          img[y][x] = (t == 0 && y < 2) ? 255 : int'($urandom % 256);
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          @(negedge clk);
          pix_valid = 1; pix_x = 8'(x); pix_y = 7'(y); pix_data = 8'(img[y][x]);
          pix_last = (x == w - 1 && y == h - 1);
          if ((x + y) % 5 == 0) begin @(negedge clk); pix_valid = 0; end
        end
      @(negedge clk); pix_valid = 0; pix_last = 0;
      // one cycle after the last pixel its write is on the port
      checks++;
      if (ii_we !== 1'b1 || ii_last !== 1'b1 || ii_waddr != IMG_AW'((h - 1) * IMG_W + w - 1)) begin
        failures++; $display("size %0d: last write not one cycle after the last pixel", t);
      end
      repeat (2) @(negedge clk);
      checks++;
      if (nlast != 1) begin failures++; $display("size %0d: last flag %0d", t, nlast); end
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          automatic longint sum = 0;
          for (int j = 0; j <= y; j++) for (int i = 0; i <= x; i++) sum += longint'(img[j][i]);
          if (cap[y * IMG_W + x] != sum) bad++;
        end
      checks += 2;
      if (bad != 0) begin failures++; $display("size %0d: %0d wrong values", t, bad); end
      if (nwrites != w * h) begin failures++; $display("size %0d: %0d writes", t, nwrites); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
