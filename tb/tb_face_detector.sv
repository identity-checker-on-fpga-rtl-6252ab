// tb_face_detector: runs the detection controller, with its scaler,
// integral unit and classifier, on whole 160x120 frames held in a
// behavioural frame RAM, with the weight memory modelled beside it. Frames:
// two faces of different contrast plus a decoy, a large face found only on
// a coarse pyramid level, and texture alone. For each frame it checks the
// returned rectangle and the number of faces against the reference model,
// that the result waits for rect_ready, and the exact run time:
// sum over levels of (lw*lh + 3 + sum over windows of (classifier cycles + 1)).
module tb_face_detector;
  import fd_pkg::*;
  import vj_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [IMG_AW-1:0] img_addr;
  logic [7:0] img_data;
  logic [7:0] num_stages;
  logic [4:0] stage_addr;
  haar_stage_t stage_data;
  logic [11:0] feat_addr;
  haar_feature_t feat_data;
  logic rect_valid, rect_ready = 0;
  face_rect_t rect;
  logic [15:0] face_count;
  int checks = 0, failures = 0;
  longint run_cycles;

  face_detector dut (.clk, .rst_n, .start, .busy, .img_addr, .img_data, .num_stages, .stage_addr,
                     .stage_data, .feat_addr, .feat_data, .rect_valid, .rect, .rect_ready, .face_count);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    img_data   <= 8'(img[int'(img_addr) / IMG_W][int'(img_addr) % IMG_W]);
    stage_data <= (int'(stage_addr) < c_stages.size()) ? c_stages[stage_addr] : '0;
    feat_data  <= (int'(feat_addr) < c_feats.size()) ? c_feats[feat_addr] : '0;
    if (busy && !rect_valid) run_cycles <= run_cycles + 1;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected_cycles();
    longint t = 0;
    for (int l = 0; build_level(l); l++) begin
      t += lv_w * lv_h + 3;
      for (int wy = 0; wy + WIN <= lv_h; wy++)
        for (int wx = 0; wx + WIN <= lv_w; wx++) begin
          longint total;
          int rs, nf;
          int nst;
          bit face = eval_window(wx, wy, total, rs, nf);
          nst = face ? int'(c_stages.size()) : rs + 1;
          t += longint'(2 + 16 * nf + 3 * nst);
        end
    end
    return t;
  endfunction

  task automatic run_frame(string name);
    face_rect_t exp_rect = ref_detect();
    int exp_faces = r_faces;
    longint exp_cyc = expected_cycles();
    run_cycles = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!rect_valid) @(negedge clk);
    // hold off the result for a while: it must stay offered
    repeat (5) @(negedge clk);
    checks += 4;
    if (!rect_valid || rect != exp_rect) begin
      failures++;
      $display("%s: rect (%0d,%0d,%0d,%0d) expected (%0d,%0d,%0d,%0d)", name, rect.x, rect.y, rect.w, rect.h,
               exp_rect.x, exp_rect.y, exp_rect.w, exp_rect.h);
    end
    if (face_count != 16'(exp_faces)) begin failures++; $display("%s: %0d faces, expected %0d", name, face_count, exp_faces); end
    if (run_cycles != exp_cyc) begin failures++; $display("%s: %0d cycles, expected %0d", name, run_cycles, exp_cyc); end
    rect_ready = 1;
    @(negedge clk); rect_ready = 0;
    @(negedge clk);
    if (busy) begin failures++; $display("%s: still busy after hand-off", name); end
    $display("%s: rect (%0d,%0d,%0d,%0d), %0d faces, %0d cycles", name, rect.x, rect.y, rect.w, rect.h, face_count, run_cycles);
  endtask

  initial begin
    make_cascade();
    num_stages = 8'(c_stages.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    draw_background(1);
    draw_face(20, 30, 24, 60);
    draw_face(100, 60, 29, 20);
    draw_decoy(60, 90);
    run_frame("two faces");
    draw_background(2);
    draw_face(40, 10, 100, 25);
    run_frame("large face");
    draw_background(3);
    run_frame("no face");
    checks++;
    if (rect != '0) begin failures++; $display("no-face frame did not return an empty rectangle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
