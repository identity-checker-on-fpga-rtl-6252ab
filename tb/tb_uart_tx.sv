// tb_uart_tx: offers bytes to the transmitter, samples the line in the
// middle of every bit and checks start bit, data (LSB first) and stop bit,
// that each bit lasts exactly CLKS_PER_BIT cycles, that ready is low during
// the frame and that back-to-back bytes follow without gaps.
module tb_uart_tx;
  localparam int N = 217;
  logic clk = 0, rst_n = 0;
  logic [7:0] data = 0;
  logic valid = 0, ready, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(N)) dut (.clk, .rst_n, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receive one frame: wait for the start edge, then measure every bit.
  task automatic receive(output logic [7:0] b, output bit ok);
    int len;
    logic lvl;
    ok = 1;
    while (txd !== 1'b0) @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      lvl = txd;
      len = 0;
      // count cycles at this level (data bits may repeat; stop at N)
      while (len < N) begin @(posedge clk); len++; if (len < N && txd != lvl) break; end
      if (len != N) ok = 0;
      if (i == 0 && lvl != 0) ok = 0;
      if (i >= 1 && i <= 8) b[i-1] = lvl;
      if (i == 9 && lvl != 1) ok = 0;
      if (i < 9 && ready) ok = 0;
    end
  endtask

  logic [7:0] q [$];
  initial begin
    logic [7:0] b;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (!ready || txd != 1) begin failures++; $display("not idle after reset"); end
    fork
      begin
        for (int t = 0; t < 24; t++) begin
          automatic logic [7:0] v = (t == 0) ? 8'h00 : (t == 1) ? 8'hFF : (t == 2) ? 8'h55 : 8'($urandom);
          q.push_back(v);
          @(negedge clk);
          data = v; valid = 1;
          do @(posedge clk); while (!ready);
          @(negedge clk); valid = 0;
          if (t % 3 == 2) repeat (N * 3) @(negedge clk);
        end
      end
      begin
        for (int t = 0; t < 24; t++) begin
          receive(b, ok);
          checks++;
          if (!ok || q.size() == 0 || b != q[0]) begin
            failures++;
            $display("frame %0d: ok=%0d got %02x exp %02x", t, ok, b, q.size() != 0 ? q[0] : 8'h0);
          end
          if (q.size() != 0) void'(q.pop_front());
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
