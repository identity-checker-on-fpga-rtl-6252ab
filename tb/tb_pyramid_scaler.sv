// tb_pyramid_scaler: a behavioural frame RAM with one cycle of read latency
// feeds the scaler; for every pyramid level the testbench checks each
// streamed pixel against the frame pixel at (floor(x*1.2^L),
// floor(y*1.2^L)), the raster order of the coordinates, the last-pixel
// flag, and that the last of lw*lh pixels leaves lw*lh cycles after start.
module tb_pyramid_scaler;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [SCALE_W-1:0] scale_q16;
  logic [7:0] lw;
  logic [6:0] lh;
  logic [IMG_AW-1:0] img_addr;
  logic [7:0] img_data;
  logic pix_valid, pix_last;
  logic [7:0] pix_x, pix_data;
  logic [6:0] pix_y;
  logic [7:0] frame [IMG_W * IMG_H];
  int checks = 0, failures = 0;

  pyramid_scaler dut (.clk, .rst_n, .start, .scale_q16, .lw, .lh, .busy, .img_addr, .img_data,
                      .pix_valid, .pix_x, .pix_y, .pix_data, .pix_last);

  always #5 clk = ~clk;
  always @(posedge clk) img_data <= frame[img_addr];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int levels = 0;
    foreach (frame[i]) frame[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; ; l++) begin
      automatic int s = 65536, w = 0, h = 0, n = 0, bad = 0, order_bad = 0, t0, t_last = 0, nlast = 0;
      for (int i = 0; i < l; i++) s = s * 6 / 5;
      while ((longint'(w) * s) >> 16 < longint'(IMG_W)) w++;
      while ((longint'(h) * s) >> 16 < longint'(IMG_H)) h++;
      if (w < WIN || h < WIN) break;
      levels++;
      @(negedge clk);
      scale_q16 = SCALE_W'(s); lw = 8'(w); lh = 7'(h); start = 1;
      @(negedge clk); start = 0;
      t0 = 0;
      while (nlast == 0 && t0 < 40000) begin
        @(posedge clk); #1; t0++;
        if (pix_valid) begin
          automatic int ex = n % w, ey = n / w;
          automatic int sx = int'((longint'(ex) * s) >> 16), sy = int'((longint'(ey) * s) >> 16);
          if (pix_x != 8'(ex) || pix_y != 7'(ey)) order_bad++;
          if (pix_data != frame[sy * IMG_W + sx]) bad++;
          n++;
          if (pix_last) begin nlast++; t_last = t0; if (n != w * h) order_bad++; end
        end
      end
      checks += 3;
      if (n != w * h || order_bad != 0) begin failures++; $display("level %0d: %0d pixels, order errors %0d", l, n, order_bad); end
      if (bad != 0) begin failures++; $display("level %0d: %0d wrong pixels", l, bad); end
      // start is taken at cycle 0; pixel n is on the stream after edge n+1
      if (t_last != w * h) begin failures++; $display("level %0d: last at %0d, expected %0d", l, t_last, w * h); end
      repeat (2) @(posedge clk);
    end
    checks++;
    if (levels != NUM_LEVELS) begin failures++; $display("levels %0d vs %0d", levels, NUM_LEVELS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
