// fd_pkg: types and constants shared by the face-detection datapath.
//
// The frame is a 160x120 8-bit grayscale image. Detection follows the
// Viola-Jones scheme: an image pyramid with a scale step of 1.2 between
// levels, an integral image per level, and a 24x24 window classified by a
// cascade of stages of Haar-like features. The frame size, the 1.2 scale
// step and the 24x24 window are the system's given numbers; the bit widths,
// the Q16 fixed-point scale and the cascade entry formats below are choices
// of this implementation.
//
// Level L of the pyramid samples the frame at x*1.2^L (nearest neighbour).
// Its width is the number of x for which floor(x*s) < 160, i.e.
// ceil(160*65536/s) with s the Q16 scale. All level data is computed here at
// elaboration time, so no divider exists in hardware.
package fd_pkg;

  localparam int IMG_W   = 160;
  localparam int IMG_H   = 120;
  localparam int PIX_W   = 8;
  localparam int WIN     = 24;
  localparam int IMG_AW  = $clog2(IMG_W * IMG_H);           // 15
  // Largest integral value is 160*120*255 = 4,896,000 < 2^23.
  localparam int II_W    = 23;
  localparam int SCALE_W = 20;                              // Q16 scale, up to 1.2^8 ~ 4.3
  localparam int MAX_LEVELS = 16;

  // Q16 scale of level l: 1.2^l, built as repeated *6/5 with truncation.
  function automatic int level_scale(input int l);
    longint s = 65536;
    for (int i = 0; i < l; i++) s = (s * 6) / 5;
    return int'(s);
  endfunction

  function automatic int level_dim(input int full, input int l);
    longint s = longint'(level_scale(l));
    return int'((longint'(full) * 65536 + s - 1) / s);
  endfunction

  function automatic int count_levels();
    int n = 0;
    while (n < MAX_LEVELS && level_dim(IMG_W, n) >= WIN && level_dim(IMG_H, n) >= WIN) n++;
    return n;
  endfunction

  localparam int NUM_LEVELS = count_levels();               // 9 for 160x120

  // One rectangle of a Haar-like feature, relative to the window origin.
  // x+w and y+h never exceed 24. wt is the signed weight of its pixel sum.
  typedef struct packed {
    logic [4:0]        x;
    logic [4:0]        y;
    logic [4:0]        w;
    logic [4:0]        h;
    logic signed [3:0] wt;
  } haar_rect_t;                                            // 24 bits

  // One feature: up to three weighted rectangles (a zero weight disables
  // one), the threshold on the weighted sum, and the two scores.
  typedef struct packed {
    haar_rect_t [2:0]   r;
    logic signed [31:0] thr;
    logic signed [15:0] left;   // score when value <  thr
    logic signed [15:0] right;  // score when value >= thr
  } haar_feature_t;                                         // 136 bits

  // One stage: its slice of the feature table and its pass threshold.
  typedef struct packed {
    logic [11:0]        first;
    logic [7:0]         count;
    logic signed [23:0] thr;    // stage passes when stage sum >= thr
  } haar_stage_t;                                           // 44 bits

  localparam int FEAT_BITS  = $bits(haar_feature_t);
  localparam int STAGE_BITS = $bits(haar_stage_t);

  // Selector of the weight memory load port.
  typedef enum logic [1:0] {
    CFG_STAGE   = 2'd0,
    CFG_FEATURE = 2'd1,
    CFG_NSTAGES = 2'd2
  } cfg_sel_e;

  // Face rectangle in frame coordinates. w = h = 0 means "no face".
  typedef struct packed {
    logic [7:0] x;
    logic [7:0] y;
    logic [7:0] w;
    logic [7:0] h;
  } face_rect_t;

endpackage
