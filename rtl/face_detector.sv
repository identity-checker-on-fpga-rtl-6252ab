// face_detector: the Viola-Jones detection controller.
//
// On `start` (a complete frame is in the frame RAM) it walks the image
// pyramid level by level. For each level it has pyramid_scaler stream the
// frame downscaled by 1.2^L into integral_image, which fills the integral
// RAM; it then slides the 24x24 window over every position of the level,
// one pixel at a time, row by row, and runs cascade_classifier on each.
// Every window that passes all stages is a face; the face with the highest
// total feature score over all levels is kept and mapped back to frame
// coordinates: x = floor(wx*1.2^L), y = floor(wy*1.2^L), w = h =
// floor(24*1.2^L). After the last level the rectangle is offered on
// rect_valid until rect_ready; w = h = 0 reports that no face was found.
//
// The pyramid, integral image, window, cascade and highest-score rule follow
// the system description. The one-pixel window step, the tie rule (the first
// face found is kept) and the empty rectangle for "no face" are choices
// made here. The level sizes and Q16 scales are constants from fd_pkg.
// Run time: for each level, lw*lh+3 cycles to build the integral image, and
// for each window 1 cycle plus the classifier time (start to done).
module face_detector
  import fd_pkg::*;
#(
  parameter int SAW = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  // frame RAM read port
  output logic [IMG_AW-1:0]   img_addr,
  input  logic [PIX_W-1:0]    img_data,
  // weight memory read ports
  input  logic [7:0]          num_stages,
  output logic [SAW-1:0]      stage_addr,
  input  haar_stage_t         stage_data,
  output logic [11:0]         feat_addr,
  input  haar_feature_t       feat_data,
  // result
  output logic                rect_valid,
  output face_rect_t          rect,
  input  logic                rect_ready,
  output logic [15:0]         face_count     // faces found in the last frame
);
  // ---- per-level constants -------------------------------------------
  logic [SCALE_W-1:0] lv_scale [NUM_LEVELS];
  logic [7:0]         lv_w     [NUM_LEVELS];
  logic [6:0]         lv_h     [NUM_LEVELS];
  logic [7:0]         lv_size  [NUM_LEVELS];
  for (genvar g = 0; g < NUM_LEVELS; g++) begin : g_level
    localparam int S = level_scale(g);
    assign lv_scale[g] = SCALE_W'(S);
    assign lv_w[g]     = 8'(level_dim(IMG_W, g));
    assign lv_h[g]     = 7'(level_dim(IMG_H, g));
    assign lv_size[g]  = 8'((WIN * S) >> 16);
  end

  localparam int LVW = $clog2(NUM_LEVELS);

  typedef enum logic [2:0] {
    D_IDLE, D_BUILD_START, D_BUILD_WAIT, D_WIN_START, D_WIN_WAIT, D_OUT
  } det_state_e;

  det_state_e          state;
  logic [LVW-1:0]      level;
  logic [7:0]          wx;
  logic [6:0]          wy;
  logic                best_valid;
  logic signed [31:0]  best_score;
  face_rect_t          best_rect;

  // ---- integral RAM ---------------------------------------------------
  logic [II_W-1:0]     ii_mem [IMG_W * IMG_H];
  logic                ii_we, ii_last;
  logic [IMG_AW-1:0]   ii_waddr, ii_raddr;
  logic [II_W-1:0]     ii_wdata, ii_rdata;

  always_ff @(posedge clk) begin
    if (ii_we) ii_mem[ii_waddr] <= ii_wdata;
    ii_rdata <= ii_mem[ii_raddr];
  end

  // ---- level build: scaler -> integral --------------------------------
  logic                sc_start, sc_busy;
  logic                pix_valid, pix_last;
  logic [7:0]          pix_x;
  logic [6:0]          pix_y;
  logic [PIX_W-1:0]    pix_data;

  assign sc_start = (state == D_BUILD_START);

  pyramid_scaler u_scaler (
    .clk, .rst_n,
    .start     (sc_start),
    .scale_q16 (lv_scale[level]),
    .lw        (lv_w[level]),
    .lh        (lv_h[level]),
    .busy      (sc_busy),
    .img_addr,
    .img_data,
    .pix_valid, .pix_x, .pix_y, .pix_data, .pix_last
  );

  integral_image u_integral (
    .clk, .rst_n,
    .pix_valid, .pix_x, .pix_y, .pix_data, .pix_last,
    .ii_we, .ii_waddr, .ii_wdata, .ii_last
  );

  // ---- window classification -------------------------------------------
  logic                cc_start, cc_busy, cc_done, cc_face;
  logic signed [31:0]  cc_score;

  assign cc_start = (state == D_WIN_START);

  cascade_classifier #(.SAW(SAW)) u_cascade (
    .clk, .rst_n,
    .start      (cc_start),
    .win_x      (wx),
    .win_y      (wy),
    .num_stages,
    .stage_addr,
    .stage_data,
    .feat_addr,
    .feat_data,
    .ii_raddr,
    .ii_rdata,
    .busy       (cc_busy),
    .done       (cc_done),
    .is_face    (cc_face),
    .score      (cc_score)
  );

  // window position mapped back to the frame
  logic [7:0]          map_x, map_y;
  assign map_x = 8'(((SCALE_W+8)'(wx) * (SCALE_W+8)'(lv_scale[level])) >> 16);
  assign map_y = 8'(((SCALE_W+8)'(wy) * (SCALE_W+8)'(lv_scale[level])) >> 16);

  logic last_x, last_y, last_level;
  assign last_x     = (wx == lv_w[level] - 8'(WIN));
  assign last_y     = (wy == lv_h[level] - 7'(WIN));
  assign last_level = (level == LVW'(NUM_LEVELS - 1));

  assign busy       = (state != D_IDLE);
  assign rect_valid = (state == D_OUT);
  assign rect       = best_valid ? best_rect : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      level      <= '0;
      wx         <= '0;
      wy         <= '0;
      best_valid <= 1'b0;
      best_score <= '0;
      best_rect  <= '0;
      face_count <= '0;
    end else begin
      unique case (state)
        D_IDLE: begin
          if (start) begin
            level      <= '0;
            best_valid <= 1'b0;
            face_count <= '0;
            state      <= D_BUILD_START;
          end
        end
        D_BUILD_START: state <= D_BUILD_WAIT;
        D_BUILD_WAIT: begin
          if (ii_last) begin
            wx    <= '0;
            wy    <= '0;
            state <= D_WIN_START;
          end
        end
        D_WIN_START: state <= D_WIN_WAIT;
        D_WIN_WAIT: begin
          if (cc_done) begin
            if (cc_face) begin
              face_count <= face_count + 1'b1;
              if (!best_valid || cc_score > best_score) begin
                best_valid <= 1'b1;
                best_score <= cc_score;
                best_rect  <= '{x: map_x, y: map_y,
                                w: lv_size[level], h: lv_size[level]};
              end
            end
            if (!last_x) begin
              wx    <= wx + 1'b1;
              state <= D_WIN_START;
            end else if (!last_y) begin
              wx    <= '0;
              wy    <= wy + 1'b1;
              state <= D_WIN_START;
            end else if (!last_level) begin
              level <= level + 1'b1;
              state <= D_BUILD_START;
            end else begin
              state <= D_OUT;
            end
          end
        end
        D_OUT: if (rect_ready) state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

  // the classifier is only started when idle, and only while windowing
  assert property (@(posedge clk) disable iff (!rst_n) cc_start |-> !cc_busy);
  assert property (@(posedge clk) disable iff (!rst_n) sc_start |-> !sc_busy);
endmodule
