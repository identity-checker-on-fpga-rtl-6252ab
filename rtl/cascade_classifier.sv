// cascade_classifier: runs the stage cascade on one 24x24 window.
//
// For every stage in order, the stage entry is read, then each of its
// features. A feature is up to three rectangles with signed weights; each
// rectangle sum comes from four integral-image reads (corners A, B, C, D,
// sum = D - B - C + A), so a feature issues twelve reads, one per cycle,
// and accumulates weight * (+/- corner) as the data returns one cycle later.
// The weighted sum is compared with the feature threshold: below it the
// feature scores `left`, otherwise `right`. The stage passes when the sum of
// its feature scores is at least the stage threshold; the first failing
// stage ends the window as "not a face". A window that passes every stage
// is a face, and `score` is the total of all its feature scores, used to
// pick the best face.
//
// Corners use padded coordinates (cx, cy) in 0..24 relative to the window:
// cx = 0 or cy = 0 is the zero border and is not read from the RAM; any
// other corner reads the inclusive integral value at (cx-1, cy-1).
//
// Timing: start is taken when idle; after one cycle, each evaluated stage
// costs 3 cycles plus 16 per feature, and `done` pulses one cycle after the
// deciding stage with is_face and score valid. The cascade
// behaviour (stages, thresholds, early reject) is the system's; the score
// rule, the integer formats and the one-read-per-cycle schedule are choices
// made here. The weight memory and integral RAM are external.
module cascade_classifier
  import fd_pkg::*;
#(
  parameter int SAW = 5            // stage address width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [7:0]          win_x,
  input  logic [6:0]          win_y,
  // weight memory
  input  logic [7:0]          num_stages,
  output logic [SAW-1:0]      stage_addr,
  input  haar_stage_t         stage_data,
  output logic [11:0]         feat_addr,
  input  haar_feature_t       feat_data,
  // integral image RAM (one-cycle read latency)
  output logic [IMG_AW-1:0]   ii_raddr,
  input  logic [II_W-1:0]     ii_rdata,
  // result
  output logic                busy,
  output logic                done,
  output logic                is_face,
  output logic signed [31:0]  score
);
  typedef enum logic [2:0] {
    C_IDLE, C_STAGE_RD, C_STAGE_LD, C_FEAT_RD, C_FEAT_LD, C_CORNER, C_SCORE, C_STAGE_END
  } cc_state_e;

  cc_state_e           state;
  logic [7:0]          stage;
  logic [7:0]          cur_count;    // features in the current stage
  logic signed [23:0]  cur_thr;      // its pass threshold
  haar_feature_t       cur_feat;
  logic [7:0]          feat_cnt;
  logic [3:0]          k;            // corner index 0..11
  logic signed [31:0]  acc;          // weighted feature value
  logic signed [23:0]  stage_sum;
  logic signed [31:0]  total;

  // corner issued this cycle
  haar_rect_t          rect_k;
  logic [1:0]          corner;
  logic [8:0]          cx, cy;
  logic                issue;
  // tag of the read returning this cycle
  logic                tag_valid, tag_zero;
  logic signed [4:0]   tag_coef;

  assign stage_addr = SAW'(stage);
  assign busy       = (state != C_IDLE);

  always_comb begin
    rect_k = cur_feat.r[k[3:2]];
    corner = k[1:0];
    cx = 9'(win_x) + 9'(rect_k.x) + (corner[0] ? 9'(rect_k.w) : 9'd0);
    cy = 9'(win_y) + 9'(rect_k.y) + (corner[1] ? 9'(rect_k.h) : 9'd0);
    ii_raddr = IMG_AW'(cy - 9'd1) * IMG_AW'(IMG_W) + IMG_AW'(cx - 9'd1);
    issue = (state == C_CORNER);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      stage     <= '0;
      cur_count <= '0;
      cur_thr   <= '0;
      cur_feat  <= '0;
      feat_addr <= '0;
      feat_cnt  <= '0;
      k         <= '0;
      acc       <= '0;
      stage_sum <= '0;
      total     <= '0;
      tag_valid <= 1'b0;
      tag_zero  <= 1'b0;
      tag_coef  <= '0;
      done      <= 1'b0;
      is_face   <= 1'b0;
      score     <= '0;
    end else begin
      done      <= 1'b0;
      tag_valid <= issue;
      if (issue) begin
        tag_zero <= (cx == 0) || (cy == 0);
        // A and D add, B and C subtract
        tag_coef <= (corner == 2'd0 || corner == 2'd3) ? 5'(rect_k.wt) : -5'(rect_k.wt);
      end
      if (tag_valid && !tag_zero)
        acc <= acc + 32'(tag_coef) * $signed({9'd0, ii_rdata});

      unique case (state)
        C_IDLE: begin
          if (start) begin
            stage <= '0;
            total <= '0;
            if (num_stages == 0) begin
              done    <= 1'b1;
              is_face <= 1'b0;
              score   <= '0;
            end else begin
              state <= C_STAGE_RD;
            end
          end
        end
        C_STAGE_RD: state <= C_STAGE_LD;     // stage_addr presented
        C_STAGE_LD: begin
          cur_count <= stage_data.count;
          cur_thr   <= stage_data.thr;
          feat_addr <= stage_data.first;
          feat_cnt  <= '0;
          stage_sum <= '0;
          state     <= (stage_data.count == 0) ? C_STAGE_END : C_FEAT_RD;
        end
        C_FEAT_RD: state <= C_FEAT_LD;       // feat_addr presented
        C_FEAT_LD: begin
          cur_feat <= feat_data;
          k        <= '0;
          acc      <= '0;
          state    <= C_CORNER;
        end
        C_CORNER: begin
          if (k == 4'd11) state <= C_SCORE;
          k <= k + 1'b1;
        end
        C_SCORE: begin
          // the last corner's data was accumulated on entry to this state
          if (!tag_valid) begin
            if (acc < cur_feat.thr) begin
              stage_sum <= stage_sum + 24'(cur_feat.left);
              total     <= total + 32'(cur_feat.left);
            end else begin
              stage_sum <= stage_sum + 24'(cur_feat.right);
              total     <= total + 32'(cur_feat.right);
            end
            feat_addr <= feat_addr + 1'b1;
            feat_cnt  <= feat_cnt + 1'b1;
            state     <= (feat_cnt + 1'b1 == cur_count) ? C_STAGE_END : C_FEAT_RD;
          end
        end
        C_STAGE_END: begin
          if (stage_sum < cur_thr) begin
            done    <= 1'b1;
            is_face <= 1'b0;
            score   <= total;
            state   <= C_IDLE;
          end else if (stage + 1'b1 == num_stages) begin
            done    <= 1'b1;
            is_face <= 1'b1;
            score   <= total;
            state   <= C_IDLE;
          end else begin
            stage <= stage + 1'b1;
            state <= C_STAGE_RD;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
