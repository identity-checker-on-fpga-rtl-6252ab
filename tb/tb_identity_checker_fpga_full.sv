// tb_identity_checker_fpga_full: end-to-end test of the FPGA design with
// every parameter at its default: the real bit time of 217 clocks (921600
// baud at 200 MHz), the full 25-stage / 2913-feature weight memory and a
// 4-deep rectangle queue. The test cascade is loaded through the
// configuration port, one frame with two faces and a decoy is sent over
// the serial input as a host would (one byte per pixel, raster order, 8N1),
// and the four result bytes x, y, w, h from the serial output are compared
// with the reference model. It also checks that all pyramid levels were
// built and reports the detector's busy time next to the transfer time.
module tb_identity_checker_fpga_full;
  import fd_pkg::*;
  import vj_ref_pkg::*;
  localparam int N = 217;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  logic cfg_we = 0;
  logic [1:0] cfg_sel = 0;
  logic [11:0] cfg_addr = 0;
  logic [FEAT_BITS-1:0] cfg_wdata = 0;
  logic busy;
  logic [15:0] frames_done, faces_found;
  logic rx_error;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_levels = 0, m_rej_first = 0, m_rej_later = 0, m_faces = 0, m_best = 0, m_noface = 0, m_queued = 0;
  logic [7:0] rx_bytes [$];

  identity_checker_fpga dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .busy, .frames_done, .faces_found, .rx_error);

  always #5 clk = ~clk;

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  // observe the detector
  always @(posedge clk) if (rst_n) begin
    if (dut.u_detector.sc_start) m_levels++;
    if (dut.u_detector.cc_done) begin
      if (dut.u_detector.cc_face) begin
        m_faces++;
        if (!dut.u_detector.best_valid || dut.u_detector.cc_score > dut.u_detector.best_score) m_best++;
      end else if (dut.u_detector.u_cascade.stage == 0) m_rej_first++;
      else m_rej_later++;
    end
    if (dut.u_queue.do_push) begin
      m_queued++;
      if (dut.det_rect.w == 0) m_noface++;
    end
  end

  // serial receiver model: sample each bit in its middle
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (N / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (N) @(posedge clk); b[i] = txd; end
      repeat (N) @(posedge clk);
      if (txd !== 1'b1) begin failures++; $display("stop bit missing on result byte"); end
      rx_bytes.push_back(b);
    end
  end

  task automatic send_byte(logic [7:0] b);
    rxd = 0; repeat (N) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (N) @(negedge clk); end
    rxd = 1; repeat (N) @(negedge clk);
  endtask

  task automatic cfg(int sel, int addr, logic [FEAT_BITS-1:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = 2'(sel); cfg_addr = 12'(addr); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run_frame(string name);
    face_rect_t exp_rect = ref_detect();
    face_rect_t got;
    int waited = 0;
    int lv0 = m_levels, best0 = m_best;
    rx_bytes.delete();
    @(negedge clk);
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) send_byte(8'(img[y][x]));
    while (rx_bytes.size() < 4 && waited < 5000000) begin @(negedge clk); waited++; end
    checks += 3;
    if (rx_bytes.size() != 4) begin
      failures++; $display("%s: %0d result bytes", name, rx_bytes.size());
    end else begin
      got = '{x: rx_bytes[0], y: rx_bytes[1], w: rx_bytes[2], h: rx_bytes[3]};
      if (got != exp_rect) begin
        failures++;
        $display("%s: got (%0d,%0d,%0d,%0d) expected (%0d,%0d,%0d,%0d)", name, got.x, got.y, got.w, got.h,
                 exp_rect.x, exp_rect.y, exp_rect.w, exp_rect.h);
      end else
        $display("%s: face rectangle (%0d,%0d,%0d,%0d), %0d faces in reference", name, got.x, got.y, got.w, got.h, r_faces);
    end
    checks++;
    if (faces_found != 16'(r_faces)) begin failures++; $display("%s: %0d faces, expected %0d", name, faces_found, r_faces); end
    if (m_levels - lv0 != NUM_LEVELS) begin failures++; $display("%s: %0d levels built", name, m_levels - lv0); end
    repeat (20) @(negedge clk);
    if (busy) begin failures++; $display("%s: still busy", name); end
  endtask

  initial begin
    make_cascade();
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (c_stages[i]) cfg(0, i, FEAT_BITS'(c_stages[i]));
    foreach (c_feats[i])  cfg(1, i, c_feats[i]);
    cfg(2, 0, FEAT_BITS'(c_stages.size()));
    draw_background(11);
    draw_face(20, 30, 24, 60);
    draw_face(100, 60, 29, 20);
    draw_decoy(60, 90);
    run_frame("two faces");
    checks++;
    if (frames_done != 1) begin failures++; $display("frames_done %0d", frames_done); end
    $display("mechanisms: levels %0d, stage-0 rejects %0d, later rejects %0d, faces %0d, best updates %0d, no-face answers %0d, rectangles queued %0d",
             m_levels, m_rej_first, m_rej_later, m_faces, m_best, m_noface, m_queued);
    $display("detector busy for %0d cycles (%0d us at 200 MHz); frame transfer %0d cycles",
             busy_cycles, busy_cycles / 200, IMG_W * IMG_H * 10 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
