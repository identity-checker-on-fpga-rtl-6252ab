// uart_rx: asynchronous serial receiver, 8 data bits, one start bit, one
// stop bit, no parity, least significant bit first.
//
// The line passes a two-flop synchronizer. A falling edge while idle starts a
// byte; the start bit is checked half a bit later, then each data bit and the
// stop bit are sampled in the middle of their bit time, CLKS_PER_BIT cycles
// apart. `valid` pulses for one cycle with the byte once the stop bit is
// sampled high; a low stop bit pulses `frame_err` instead and the byte is
// dropped. A start bit that is high again at mid-bit is taken as a glitch.
//
// The framing (one start and one stop bit, 921600 baud) is the system's; the
// default CLKS_PER_BIT = 217 is a 200 MHz clock divided by 921600. Data
// width, bit order, no parity and mid-bit sampling are choices made here.
// Latency: valid rises about 9.5 bit times after the start edge.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e       state;
  logic [CW-1:0]   cnt;
  logic [2:0]      bit_idx;
  logic [7:0]      shreg;
  logic            rxd_m, rxd_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RX_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          if (!rxd_s) begin
            state <= RX_START;
            cnt   <= CW'(CLKS_PER_BIT / 2);
          end
        end
        RX_START: begin
          if (cnt == 0) begin
            if (!rxd_s) begin
              state   <= RX_DATA;
              cnt     <= CW'(CLKS_PER_BIT - 1);
              bit_idx <= '0;
            end else begin
              state <= RX_IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RX_DATA: begin
          if (cnt == 0) begin
            shreg <= {rxd_s, shreg[7:1]};
            cnt   <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RX_STOP: begin
          if (cnt == 0) begin
            state <= RX_IDLE;
            if (rxd_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
