// tb_image_buffer: streams two full 160x120 frames into the frame RAM with
// gaps between bytes, checks that frame_ready pulses exactly once per frame,
// one cycle after the last pixel, and reads every pixel back through the
// one-cycle synchronous read port. A clear in mid-frame must restart the
// write pointer at pixel 0.
module tb_image_buffer;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, wr_valid = 0, frame_ready;
  logic [7:0] wr_data = 0, rd_data;
  logic [IMG_AW-1:0] rd_addr = 0;
  int checks = 0, failures = 0, n_ready = 0;

  image_buffer dut (.clk, .rst_n, .clear, .wr_valid, .wr_data, .frame_ready, .rd_addr, .rd_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (frame_ready) n_ready++;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(int i, int f);
    return 8'((i * 7 + (i >> 8) * 13 + f * 101) ^ (i >> 3));
  endfunction

  task automatic write_frame(int f, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); wr_valid = 1; wr_data = pat(i, f);
      if (i == IMG_W * IMG_H - 1) begin
        @(negedge clk); wr_valid = 0;
        // frame_ready is registered: visible now, one cycle after the write
        checks++;
        if (frame_ready !== 1'b1) begin failures++; $display("frame_ready late/missing"); end
      end else if (i % 97 == 0) begin
        @(negedge clk); wr_valid = 0;
      end
    end
    @(negedge clk); wr_valid = 0;
  endtask

  task automatic check_frame(int f);
    int bad = 0;
    for (int i = 0; i < IMG_W * IMG_H; i++) begin
      @(negedge clk); rd_addr = IMG_AW'(i);
      @(negedge clk);
      if (rd_data != pat(i, f)) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("frame %0d: %0d pixels wrong", f, bad); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      n_ready = 0;
      write_frame(f, IMG_W * IMG_H);
      repeat (3) @(posedge clk);
      checks++;
      if (n_ready != 1) begin failures++; $display("frame %0d: %0d ready pulses", f, n_ready); end
      check_frame(f);
    end
    // partial frame, clear, then a full frame must line up from pixel 0
    n_ready = 0;
    write_frame(5, 1000);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    write_frame(2, IMG_W * IMG_H);
    repeat (3) @(posedge clk);
    checks++;
    if (n_ready != 1) begin failures++; $display("after clear: %0d ready pulses", n_ready); end
    check_frame(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
