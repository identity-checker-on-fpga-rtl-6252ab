// vj_ref_pkg: reference model and stimulus helpers for the face-detection
// testbenches.
//
// It holds a frame as a plain 2-D array, a small hand-made three-stage
// cascade whose features respond to a dark eye band over brighter cheeks
// and a bright nose bridge between the eyes, and a straightforward
// software detector: for every pyramid level it resamples the frame by
// nearest neighbour at 1.2^L, builds a zero-bordered integral image,
// evaluates every 24x24 window stage by stage, and keeps the face with the
// highest total score (first one on ties). Nothing here is shared with the
// RTL except the type definitions of fd_pkg.
package vj_ref_pkg;
  import fd_pkg::*;

  int             img [IMG_H][IMG_W];
  haar_stage_t    c_stages [$];
  haar_feature_t  c_feats  [$];

  // statistics of the last ref_detect call
  int             r_faces;
  int             r_windows;
  int             r_reject_first;   // windows rejected by stage 0
  int             r_reject_later;   // windows rejected by a later stage
  int             r_best_updates;

  function automatic haar_rect_t R(int x, int y, int w, int h, int wt);
    haar_rect_t r;
    r.x = 5'(x); r.y = 5'(y); r.w = 5'(w); r.h = 5'(h); r.wt = 4'(wt);
    return r;
  endfunction

  function automatic haar_feature_t F(haar_rect_t r0, haar_rect_t r1, haar_rect_t r2,
                                      int thr, int left, int right);
    haar_feature_t f;
    f.r[0] = r0; f.r[1] = r1; f.r[2] = r2;
    f.thr = thr; f.left = 16'(left); f.right = 16'(right);
    return f;
  endfunction

  function automatic void add_stage(int count, int thr);
    haar_stage_t s;
    s.first = 12'(c_feats.size() - count);
    s.count = 8'(count);
    s.thr   = 24'(thr);
    c_stages.push_back(s);
  endfunction

  // The test cascade.
  function automatic void make_cascade();
    haar_rect_t z = R(0, 0, 0, 0, 0);
    c_stages.delete();
    c_feats.delete();
    // stage 0: eye band darker than cheek band
    c_feats.push_back(F(R(2, 6, 20, 4, 1), R(2, 10, 20, 4, -1), z, -3000, 10, -10));
    add_stage(1, 5);
    // stage 1: bright bridge between the eyes, and a bright window overall
    c_feats.push_back(F(R(2, 6, 20, 4, 1), R(9, 6, 6, 4, -3), z, 0, 7, -7));
    c_feats.push_back(F(R(0, 0, 24, 24, 1), z, z, 24 * 24 * 100, -1, 2));
    add_stage(2, 8);
    // stage 2: graded eye/cheek contrast, to rank the faces
    c_feats.push_back(F(R(2, 6, 20, 4, 1), R(2, 10, 20, 4, -1), z, -5000, 1, 0));
    c_feats.push_back(F(R(2, 6, 20, 4, 1), R(2, 10, 20, 4, -1), z, -7000, 1, 0));
    c_feats.push_back(F(R(2, 6, 20, 4, 1), R(2, 10, 20, 4, -1), z, -8000, 1, 0));
    c_feats.push_back(F(R(2, 6, 20, 4, 1), R(2, 10, 20, 4, -1), R(9, 6, 6, 4, -1), -12000, 3, 0));
    add_stage(4, 1);
  endfunction

  // Textured bright background; seed selects the pattern.
  function automatic void draw_background(int seed);
    int unsigned lfsr = 32'hACE1 ^ seed;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        lfsr = lfsr * 1103515245 + 12345;
        img[y][x] = 150 + int'((lfsr >> 16) % 60);
      end
  endfunction

  // A schematic face of size sz at (x0, y0): dark eyes, bright bridge,
  // bright cheeks, mid-tone skin. eye sets the eye darkness.
  function automatic void draw_face(int x0, int y0, int sz, int eye);
    for (int py = y0; py < y0 + sz && py < IMG_H; py++)
      for (int px = x0; px < x0 + sz && px < IMG_W; px++) begin
        int u = (px - x0) * 24 / sz;
        int v = (py - y0) * 24 / sz;
        int p = 180;
        if (v >= 6 && v < 10) p = (u >= 9 && u < 15) ? 215 : ((u >= 2 && u < 22) ? eye : 180);
        else if (v >= 10 && v < 14) p = 205;
        img[py][px] = p;
      end
  endfunction

  // A dark bar without a bridge: passes stage 0, fails stage 1.
  function automatic void draw_decoy(int x0, int y0);
    for (int py = y0; py < y0 + 24; py++)
      for (int px = x0; px < x0 + 24; px++) begin
        int v = py - y0;
        img[py][px] = (v >= 6 && v < 10) ? 30 : ((v >= 10 && v < 14) ? 220 : 170);
      end
  endfunction

  function automatic int scale_of(int l);
    int s = 65536;
    for (int i = 0; i < l; i++) s = s * 6 / 5;
    return s;
  endfunction

  // Zero-bordered integral image of the current level: ii[y][x] is the sum
  // of level pixels with row < y and column < x.
  longint ii [IMG_H + 1][IMG_W + 1];
  int     lv_w, lv_h;

  // Resample level l into ii; returns 0 when the level is below 24x24.
  function automatic bit build_level(int l);
    int s = scale_of(l);
    lv_w = 0;
    lv_h = 0;
    while ((longint'(lv_w) * s) >> 16 < longint'(IMG_W)) lv_w++;
    while ((longint'(lv_h) * s) >> 16 < longint'(IMG_H)) lv_h++;
    if (lv_w < WIN || lv_h < WIN) return 0;
    for (int y = 0; y <= lv_h; y++)
      for (int x = 0; x <= lv_w; x++) begin
        if (x == 0 || y == 0) ii[y][x] = 0;
        else begin
          longint ly = longint'(y) - 1, lx = longint'(x) - 1;
          int     sy = int'((ly * longint'(s)) >>> 16), sx = int'((lx * longint'(s)) >>> 16);
          ii[y][x] = ii[y-1][x] + ii[y][x-1] - ii[y-1][x-1] + longint'(img[sy][sx]);
        end
      end
    return 1;
  endfunction

  // Cascade on the window at (wx, wy) of the current level. Returns 1 for a
  // face; total is the sum of the scores of all evaluated features and
  // rej_stage the failing stage (-1 for a face), feats_run the features evaluated.
  function automatic bit eval_window(int wx, int wy, output longint total,
                                     output int rej_stage, output int feats_run);
    total = 0;
    rej_stage = -1;
    feats_run = 0;
    foreach (c_stages[si]) begin
      longint ssum = 0;
      for (int fi = int'(c_stages[si].first); fi < int'(c_stages[si].first) + int'(c_stages[si].count); fi++) begin
        longint val = 0;
        for (int ri = 0; ri < 3; ri++) begin
          haar_rect_t r = c_feats[fi].r[ri];
          int x0 = wx + int'(r.x), y0 = wy + int'(r.y);
          int x1 = x0 + int'(r.w), y1 = y0 + int'(r.h);
          val += longint'(r.wt) * (ii[y1][x1] - ii[y0][x1] - ii[y1][x0] + ii[y0][x0]);
        end
        if (val < longint'(c_feats[fi].thr)) ssum += longint'(c_feats[fi].left);
        else                                ssum += longint'(c_feats[fi].right);
        feats_run++;
      end
      total += ssum;
      if (ssum < longint'(c_stages[si].thr)) begin
        rej_stage = si;
        return 0;
      end
    end
    return 1;
  endfunction

  function automatic face_rect_t ref_detect();
    face_rect_t best = '0;
    longint     best_score = 0;
    bit         have = 0;
    r_faces = 0; r_windows = 0; r_reject_first = 0; r_reject_later = 0; r_best_updates = 0;
    for (int l = 0; build_level(l); l++) begin
      int s = scale_of(l);
      for (int wy = 0; wy + WIN <= lv_h; wy++)
        for (int wx = 0; wx + WIN <= lv_w; wx++) begin
          longint total;
          int     rs, nf;
          r_windows++;
          if (eval_window(wx, wy, total, rs, nf)) begin
            r_faces++;
            if (!have || total > best_score) begin
              have = 1;
              best_score = total;
              r_best_updates++;
              best.x = 8'((longint'(wx) * s) >> 16);
              best.y = 8'((longint'(wy) * s) >> 16);
              best.w = 8'((longint'(WIN) * s) >> 16);
              best.h = best.w;
            end
          end else if (rs == 0) r_reject_first++;
          else r_reject_later++;
        end
    end
    return best;
  endfunction
endpackage
