// tb_uart_rx: sends bytes on the serial line at the default bit time and
// checks that each is received once, with the right value, about 9.5 bit
// times after its start edge; a byte with a low stop bit must raise
// frame_err and no valid; a short low glitch must produce nothing.
module tb_uart_rx;
  localparam int N = 217;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  longint cyc = 0, start_cyc;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_byte;
  longint last_lat;

  uart_rx #(.CLKS_PER_BIT(N)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin n_valid++; last_byte = data; last_lat = cyc - start_cyc; end
    if (frame_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input bit good_stop);
    @(negedge clk); rxd = 0; start_cyc = cyc;
    repeat (N) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (N) @(negedge clk); end
    rxd = good_stop; repeat (N) @(negedge clk);
    rxd = 1; repeat (N) @(negedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      b = (t < 2) ? (t == 0 ? 8'h00 : 8'hFF) : 8'($urandom);
      n_valid = 0; n_err = 0;
      send(b, 1);
      checks++;
      if (n_valid != 1 || n_err != 0 || last_byte != b) begin
        failures++;
        $display("byte %0d: sent %02x got %02x valid=%0d err=%0d", t, b, last_byte, n_valid, n_err);
      end
      checks++;
      if (last_lat < longint'(N) * 19 / 2 - 3 || last_lat > longint'(N) * 19 / 2 + 6) begin
        failures++;
        $display("byte %0d: latency %0d cycles", t, last_lat);
      end
    end
    // bad stop bit
    n_valid = 0; n_err = 0;
    send(8'h5A, 0);
    checks++;
    if (n_valid != 0 || n_err != 1) begin failures++; $display("bad stop: valid=%0d err=%0d", n_valid, n_err); end
    // glitch shorter than half a bit
    n_valid = 0; n_err = 0;
    @(negedge clk); rxd = 0; repeat (N / 4) @(negedge clk); rxd = 1;
    repeat (12 * N) @(negedge clk);
    checks++;
    if (n_valid != 0 || n_err != 0) begin failures++; $display("glitch produced output"); end
    // a good byte after all that
    n_valid = 0;
    send(8'hC3, 1);
    checks++;
    if (n_valid != 1 || last_byte != 8'hC3) begin failures++; $display("resync failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
