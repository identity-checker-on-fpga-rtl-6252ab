// identity_checker_fpga: FPGA side of a camera face-identification system.
//
// The host sends a 160x120 grayscale frame over UART, one byte per pixel in
// raster order. uart_rx feeds the bytes into image_buffer; when the last
// pixel lands, face_detector runs the Viola-Jones cascade, whose stages and
// features sit in cascade_weights, over the whole image pyramid and
// produces the rectangle of the best-scoring face. The rectangle is queued
// in rect_fifo and rect_sender returns it over uart_tx as four bytes
// x, y, w, h (w = h = 0: no face).
//
// The classifier is trained offline, so the weight memory is loaded through
// the cfg_* port (cfg_sel: 0 stage entry, 1 feature entry, 2 stage count)
// before frames are sent. A frame must not be sent while `busy` is high.
// frames_done counts results handed to the queue, faces_found is the number
// of windows that passed every stage in the last frame, and rx_error
// pulses for a received byte whose stop bit was low (the byte is dropped).
//
// The split into UART receiver, frame block RAM, detector, weight block RAM,
// rectangle queue and UART transmitter, the 921600 baud link and the 200 MHz
// clock (CLKS_PER_BIT = 217) follow the system description; the wire
// formats and handshakes are this implementation's choices.
module identity_checker_fpga
  import fd_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 217,
  parameter int          FIFO_DEPTH   = 4,
  parameter int          MAX_STAGES   = 25,
  parameter int          MAX_FEATURES = 2913
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  uart_rxd,
  output logic                  uart_txd,
  input  logic                  cfg_we,
  input  logic [1:0]            cfg_sel,
  input  logic [11:0]           cfg_addr,
  input  logic [FEAT_BITS-1:0]  cfg_wdata,
  output logic                  busy,
  output logic [15:0]           frames_done,
  output logic [15:0]           faces_found,   // windows accepted in the last frame
  output logic                  rx_error       // pulse: a byte had a bad stop bit
);
  localparam int SAW = $clog2(MAX_STAGES);

  // ---- host -> frame RAM ------------------------------------------------
  logic [7:0]         rx_data;
  logic               rx_valid;
  logic               frame_ready;
  logic [IMG_AW-1:0]  img_addr;
  logic [PIX_W-1:0]   img_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd),
    .data(rx_data), .valid(rx_valid), .frame_err(rx_error)
  );

  image_buffer u_frame (
    .clk, .rst_n,
    .clear       (1'b0),
    .wr_valid    (rx_valid),
    .wr_data     (rx_data),
    .frame_ready,
    .rd_addr     (img_addr),
    .rd_data     (img_data)
  );

  // ---- classifier weights -------------------------------------------------
  logic [SAW-1:0]  stage_addr;
  haar_stage_t     stage_data;
  logic [11:0]     feat_addr;
  haar_feature_t   feat_data;
  logic [7:0]      num_stages;

  cascade_weights #(.MAX_STAGES(MAX_STAGES), .MAX_FEATURES(MAX_FEATURES)) u_weights (
    .clk, .rst_n,
    .cfg_we, .cfg_sel(cfg_sel_e'(cfg_sel)), .cfg_addr, .cfg_wdata,
    .stage_addr, .stage_data, .feat_addr, .feat_data, .num_stages
  );

  // ---- detection ------------------------------------------------------------
  logic        rect_valid, fifo_full;
  face_rect_t  det_rect;

  face_detector #(.SAW(SAW)) u_detector (
    .clk, .rst_n,
    .start      (frame_ready),
    .busy,
    .img_addr, .img_data,
    .num_stages, .stage_addr, .stage_data, .feat_addr, .feat_data,
    .rect_valid,
    .rect       (det_rect),
    .rect_ready (!fifo_full),
    .face_count (faces_found)
  );

  // ---- rectangle queue -> host --------------------------------------------
  logic        fifo_pop, fifo_empty;
  face_rect_t  fifo_head;
  logic [7:0]  tx_data;
  logic        tx_valid, tx_ready;

  rect_fifo #(.DEPTH(FIFO_DEPTH), .T(face_rect_t)) u_queue (
    .clk, .rst_n,
    .push  (rect_valid),
    .din   (det_rect),
    .full  (fifo_full),
    .pop   (fifo_pop),
    .dout  (fifo_head),
    .empty (fifo_empty)
  );

  rect_sender u_sender (
    .clk, .rst_n,
    .rect     (fifo_head),
    .empty    (fifo_empty),
    .pop      (fifo_pop),
    .tx_data, .tx_valid, .tx_ready
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n,
    .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd(uart_txd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                        frames_done <= '0;
    else if (rect_valid && !fifo_full) frames_done <= frames_done + 1'b1;
  end
endmodule
