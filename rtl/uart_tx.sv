// uart_tx: asynchronous serial transmitter with the same framing as uart_rx
// (one start bit, 8 data bits LSB first, one stop bit).
//
// `ready` is high while the transmitter is idle; a byte is taken on a cycle
// with valid && ready. The 10 bits then go out, each held CLKS_PER_BIT
// cycles, so one byte occupies 10*CLKS_PER_BIT cycles and ready returns one
// cycle after the stop bit ends. The line idles high.
//
// The framing and the 921600 baud rate are the system's; the valid/ready
// handshake is a choice made here.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    shreg;     // {stop, data}: bits still to send, next in bit 0
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data};
        bits_left <= 4'd10;
        cnt       <= CW'(CLKS_PER_BIT - 1);
        txd       <= 1'b0;
      end
    end else if (cnt == 0) begin
      bits_left <= bits_left - 1'b1;
      cnt       <= CW'(CLKS_PER_BIT - 1);
      shreg     <= {1'b1, shreg[8:1]};
      txd       <= (bits_left == 1) ? 1'b1 : shreg[0];
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
