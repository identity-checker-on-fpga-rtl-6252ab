// tb_rect_sender: a queue model holds rectangles; the sender must pop each
// once and hand its bytes x, y, w, h in order to a transmitter model whose
// ready goes low for a random number of cycles after every byte. Checks
// the byte stream, that no byte is lost or repeated while ready is low, and
// that nothing is popped while a rectangle is still being sent.
module tb_rect_sender;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0, empty = 1, pop, tx_valid, tx_ready = 0;
  logic [7:0] tx_data;
  face_rect_t rect = '0;
  face_rect_t q [$], incoming [$];
  logic [7:0] exp_bytes [$];
  int checks = 0, failures = 0, busy_cnt = 0, got = 0;

  rect_sender dut (.clk, .rst_n, .rect, .empty, .pop, .tx_data, .tx_valid, .tx_ready);

  always #5 clk = ~clk;
  // queue head as seen by the sender, refreshed whenever the queue changes
  task automatic refresh();
    empty <= (q.size() == 0);
    rect  <= (q.size() == 0) ? '0 : q[0];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    // new rectangles from the stimulus join the queue at the clock edge
    while (incoming.size() != 0) q.push_back(incoming.pop_front());
    refresh();
    if (pop) begin
      checks++;
      if (tx_valid) begin failures++; $display("pop while sending"); end
      exp_bytes.push_back(q[0].x); exp_bytes.push_back(q[0].y);
      exp_bytes.push_back(q[0].w); exp_bytes.push_back(q[0].h);
      void'(q.pop_front());
      refresh();
    end
    if (tx_valid && tx_ready) begin
      checks++;
      got++;
      if (exp_bytes.size() == 0 || tx_data != exp_bytes[0]) begin
        failures++; $display("byte %0d: got %02x", got, tx_data);
      end
      if (exp_bytes.size() != 0) void'(exp_bytes.pop_front());
      busy_cnt <= int'($urandom % 12);
      tx_ready <= 1'b0;
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
    end else begin
      tx_ready <= 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      incoming.push_back(face_rect_t'($urandom));
      repeat ($urandom % 60) @(negedge clk);
    end
    while (incoming.size() != 0 || q.size() != 0 || exp_bytes.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (got != 160) begin failures++; $display("%0d bytes sent, expected 160", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
