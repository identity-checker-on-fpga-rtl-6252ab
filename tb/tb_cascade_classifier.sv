// tb_cascade_classifier: the classifier reads a behavioural integral RAM
// and weight memory (both with one cycle of latency) filled from the
// reference model's test cascade. Frames with drawn faces, decoys and
// texture are resampled to several pyramid levels; for hundreds of windows,
// among them faces, first-stage and later-stage rejections, the testbench
// compares is_face and the total score with the reference, and checks the
// cycle count from start to done: 1 + sum over evaluated stages of
// (3 + 16 * features).
module tb_cascade_classifier;
  import fd_pkg::*;
  import vj_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] win_x = 0;
  logic [6:0] win_y = 0;
  logic [7:0] num_stages;
  logic [4:0] stage_addr;
  haar_stage_t stage_data;
  logic [11:0] feat_addr;
  haar_feature_t feat_data;
  logic [IMG_AW-1:0] ii_raddr;
  logic [II_W-1:0] ii_rdata;
  logic busy, done, is_face;
  logic signed [31:0] score;
  logic [II_W-1:0] iimem [IMG_W * IMG_H];
  int checks = 0, failures = 0;
  int n_face = 0, n_rej0 = 0, n_rej_later = 0;

  cascade_classifier dut (.clk, .rst_n, .start, .win_x, .win_y, .num_stages, .stage_addr, .stage_data,
                          .feat_addr, .feat_data, .ii_raddr, .ii_rdata, .busy, .done, .is_face, .score);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ii_rdata   <= iimem[ii_raddr];
    stage_data <= (int'(stage_addr) < c_stages.size()) ? c_stages[stage_addr] : '0;
    feat_data  <= (int'(feat_addr) < c_feats.size()) ? c_feats[feat_addr] : '0;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_window(int wx, int wy);
    longint total;
    int rs, nf, cyc = 0, exp_cyc;
    bit face;
    face = eval_window(wx, wy, total, rs, nf);
    // stages run = all for a face, rs+1 otherwise
    exp_cyc = 1 + 16 * nf + 3 * (face ? c_stages.size() : rs + 1);
    @(negedge clk); win_x = 8'(wx); win_y = 7'(wy); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks += 2;
    if (is_face != face || (face && longint'(score) != total) || (!face && longint'(score) != total)) begin
      failures++;
      $display("window (%0d,%0d): face %0d/%0d score %0d/%0d", wx, wy, is_face, face, score, total);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("window (%0d,%0d): %0d cycles, expected %0d", wx, wy, cyc, exp_cyc);
    end
    if (face) n_face++; else if (rs == 0) n_rej0++; else n_rej_later++;
  endtask

  initial begin
    make_cascade();
    num_stages = 8'(c_stages.size());
    draw_background(3);
    draw_face(30, 20, 24, 40);
    draw_face(90, 40, 40, 20);
    draw_decoy(120, 80);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      void'(build_level(l));
      for (int y = 0; y < lv_h; y++)
        for (int x = 0; x < lv_w; x++)
          iimem[y * IMG_W + x] = II_W'(ii[y + 1][x + 1]);
      if (l == 0) begin
        // around the faces and the decoy, plus the image corners
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++) begin
            run_window(30 + dx, 20 + dy);
            run_window(120 + dx, 80 + dy);
          end
        run_window(0, 0);
        run_window(lv_w - 24, lv_h - 24);
      end
      for (int k = 0; k < 60; k++)
        run_window(int'($urandom % (lv_w - 23)), int'($urandom % (lv_h - 23)));
      if (l == 2)
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) run_window(62 + dx, 27 + dy);
    end
    checks++;
    if (n_face == 0 || n_rej0 == 0 || n_rej_later == 0) begin
      failures++;
      $display("coverage: faces %0d, stage-0 rejects %0d, later rejects %0d", n_face, n_rej0, n_rej_later);
    end
    $display("faces %0d, stage-0 rejects %0d, later rejects %0d", n_face, n_rej0, n_rej_later);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
