// End-to-end testbench for orb_top at a reduced frame size (160 x 120, four
// scales 160x120, 128x96, 102x77, 82x61). Synthetic frames (flat noise with
// bright and dark rectangles) are streamed through the accelerator; an
// external-memory model with random stalls holds the stored smoothed scales.
// Checked against the reference models:
//  * the keypoints of each scale (FAST-9, full 3x3 NMS, per-segment score
//    threshold recomputed from its definition),
//  * the smoothed scales 0 and 2 written to memory (interior pixels),
//  * every feature: its keypoint must be expected and not at the border, its
//    orientation must match the real-valued reference (a neighbouring bin is
//    accepted only within 0.05 degree of a bin boundary), and its descriptor
//    must equal the reference descriptor of the patch taken from memory,
//  * every expected feature arrives exactly once, and the border drops match,
//  * a frame occupies the input for exactly W*(H+PAD_ROWS) pixel slots.
// Each mechanism of the design is counted and must occur at least once:
// input padding, keypoints on each scale, features on each scale (odd scales
// use the on-the-fly downsampling of patches), column reuse, border drops,
// memory stalls, the loader waiting for rows, the descriptor buffer being
// full, output back-pressure, and the score threshold removing keypoints.
module tb_orb_top;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  localparam int W = 160, H = 120, PAD = 20, FRAMES = 2, DD = 4;
  localparam int BASE2 = W * H;
  int checks = 0, failures = 0, fail_print = 0;

  logic clk = 0, rst_n = 0;
  pix_t cfg_t = 8'd20;
  logic [7:0] cfg_tn = 8'd255;
  logic in_valid = 0, in_ready, in_sof = 0;
  pix_t in_pix = '0;
  logic wr0_valid, wr0_ready, wr2_valid, wr2_ready, rd_valid, rd_ready, rsp_valid;
  logic [ADDR_W-1:0] wr0_addr, wr2_addr, rd_addr;
  pix_t wr0_data, wr2_data, rsp_data;
  logic f_valid, f_ready = 0;
  feat_t f_data;
  logic [3:0] kp_pulse, rec_overrun, kp_overflow;
  logic [1:0] sm_overflow;
  logic [31:0] n_fetch, n_reuse, n_border;

  orb_top #(.W(W), .H(H), .PAD_ROWS(PAD), .DESC_DEPTH(DD), .BASE0(0), .BASE2(BASE2)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_t(cfg_t), .cfg_tn(cfg_tn),
    .in_valid(in_valid), .in_ready(in_ready), .in_sof(in_sof), .in_pix(in_pix),
    .wr0_valid(wr0_valid), .wr0_ready(wr0_ready), .wr0_addr(wr0_addr), .wr0_data(wr0_data),
    .wr2_valid(wr2_valid), .wr2_ready(wr2_ready), .wr2_addr(wr2_addr), .wr2_data(wr2_data),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_addr(rd_addr),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data),
    .f_valid(f_valid), .f_ready(f_ready), .f_data(f_data),
    .kp_pulse(kp_pulse), .rec_overrun(rec_overrun), .kp_overflow(kp_overflow),
    .sm_overflow(sm_overflow), .n_fetch(n_fetch), .n_reuse(n_reuse), .n_border(n_border)
  );

  ext_mem_model #(.SIZE(1 << 15), .LAT(6), .STALL_PCT(20), .WR_STALL_PCT(4)) u_mem (.clk(clk),
    .wr0_valid(wr0_valid), .wr0_ready(wr0_ready), .wr0_addr(wr0_addr), .wr0_data(wr0_data),
    .wr2_valid(wr2_valid), .wr2_ready(wr2_ready), .wr2_addr(wr2_addr), .wr2_data(wr2_data),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_addr(rd_addr),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (fail_print++ < 10) $display("FAIL %s", s);
  endtask

  // ---- reference images ---------------------------------------------------
  img_t img [4];
  int   ws [4], hs [4];
  int   exp_x [4][$], exp_y [4][$];
  bit   exp_feat [int];      // key -> not yet received
  int   n_nms [4];

  function automatic int key(int s, int x, int y);
    return (s << 24) | (y << 12) | x;
  endfunction

  // keypoints of one scale: FAST, 3x3 NMS, score recorder
  function automatic void ref_scale(int s, int tt, int ttn);
    int w, h;
    int sc [];
    bit fl [], mx [];
    int S [8];
    w = ws[s]; h = hs[s];
    sc = new[w * h]; fl = new[w * h]; mx = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        bit c; int v;
        c = 0; v = 0;
        if (x >= 3 && x < w - 3 && y >= 3 && y < h - 3) fast(img[s], w, x, y, tt, c, v);
        fl[y * w + x] = c; sc[y * w + x] = v;
      end
    n_nms[s] = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        bit m;
        m = fl[y * w + x];
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if ((dx || dy) && x + dx >= 0 && x + dx < w && y + dy >= 0 && y + dy < h)
              if (fl[(y + dy) * w + x + dx] && sc[(y + dy) * w + x + dx] > sc[y * w + x]) m = 0;
        mx[y * w + x] = m;
        if (m) n_nms[s]++;
      end
    for (int j = 0; j < 8; j++) S[j] = 9 * tt + ((4080 - 9 * tt) * j) / 8;
    exp_x[s].delete(); exp_y[s].delete();
    for (int y = 0; y < h; y++)
      for (int j = 0; j < 8; j++) begin
        int x0, x1, N [8], ptr, ts;
        x0 = (j * w) / 8; x1 = ((j + 1) * w) / 8 - 1;
        for (int k = 0; k < 8; k++) N[k] = 0;
        for (int x = x0; x <= x1; x++)
          if (mx[y * w + x]) for (int k = 0; k < 8; k++) if (sc[y * w + x] > S[k]) N[k]++;
        ptr = 7;
        for (int k = 7; k >= 0; k--) if (N[k] < ttn) ptr = k;
        ts = (ptr == 0 || N[ptr] > ttn / 2) ? S[ptr] : (S[ptr] + S[ptr - 1]) / 2;
        for (int x = x0; x <= x1; x++)
          if (mx[y * w + x] && sc[y * w + x] > ts) begin
            exp_x[s].push_back(x); exp_y[s].push_back(y);
          end
      end
  endfunction

  // ---- keypoint monitors --------------------------------------------------
  int got_x [4][$], got_y [4][$];
  for (genvar s = 0; s < 4; s++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.kpv[s]) begin
      got_x[s].push_back(int'(dut.kpd[s].x));
      got_y[s].push_back(int'(dut.kpd[s].y));
    end
  end

  // ---- mechanism counters -------------------------------------------------
  int m_pad = 0, m_wait = 0, m_full = 0, m_bp = 0, m_stall_rd = 0, m_feat [4] = '{0, 0, 0, 0}, m_drop = 0;
  int n_feat = 0;
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) m_pad++;
    if (int'(dut.u_loader.state) == 2) m_wait++;
    if (!dut.room) m_full++;
    if (f_valid && !f_ready) m_bp++;
    if (rd_valid && !rd_ready) m_stall_rd++;
  end

  // ---- feature checker ------------------------------------------------------
  img_t st0, st2;   // stored smoothed scales, read back from memory

  function automatic int stored(int s, int x, int y);
    if (s == 0) return int'(u_mem.mem[y * W + x]);
    return int'(u_mem.mem[BASE2 + y * ws[2] + x]);
  endfunction

  function automatic int patch_px(int s, int x, int y);
    if (s == 0 || s == 2) return stored(s, x, y);
    if (s == 1) return ds_px(st0, ws[0], x, y);
    return ds_px(st2, ws[2], x, y);
  endfunction

  feat_t fq [$];
  always @(posedge clk) if (rst_n && f_valid && f_ready) begin
    fq.push_back(f_data);
    n_feat++;
    m_feat[int'(f_data.scale)]++;
  end

  task automatic check_feature(feat_t fd);
    int s, x, y, id;
    longint mx, my;
    real ang;
    img_t p;
    bit [255:0] d;
    s = int'(fd.scale); x = int'(fd.x); y = int'(fd.y);
    checks++;
    if (!exp_feat.exists(key(s, x, y)) || !exp_feat[key(s, x, y)])
      fail($sformatf("unexpected feature s%0d (%0d,%0d)", s, x, y));
    else begin
      exp_feat[key(s, x, y)] = 0;
      p = new[43 * 43];
      for (int r = 0; r < 43; r++)
        for (int c = 0; c < 43; c++) p[r * 43 + c] = 8'(patch_px(s, x - 21 + c, y - 21 + r));
      id = orient(p, mx, my, ang);
      checks++;
      if (int'(fd.orient) != id && bin_margin(ang) > 0.05)
        fail($sformatf("orientation s%0d (%0d,%0d): %0d expected %0d", s, x, y, fd.orient, id));
      d = descriptor(p, int'(fd.orient));
      checks++;
      if (fd.desc !== d) fail($sformatf("descriptor s%0d (%0d,%0d)", s, x, y));
    end
  endtask

  // ---- stimulus -------------------------------------------------------------
  // the consumer accepts 60% of cycles, and stops completely for 60000 of
  // every 200000 cycles so that the descriptor buffer fills
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    f_ready <= ($urandom_range(0, 99) < 60) && (cyc % 200000 < 140000);
  end

  initial begin
    ws[0] = W; hs[0] = H;
    for (int s = 1; s < 4; s++) begin ws[s] = ds_len(ws[s-1]); hs[s] = ds_len(hs[s-1]); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int nexp, nborder0, nfeat0, nkp_tot, nnms_tot, t0, t1;
      cfg_tn = (f == 0) ? 8'd255 : 8'd2;
      img[0] = new[W * H];
      for (int i = 0; i < W * H; i++) img[0][i] = 8'(100 + $urandom_range(0, 6));
      for (int b = 0; b < 40; b++) begin
        int bx, by, bw, bh, v;
        bx = $urandom_range(0, W - 1); by = $urandom_range(0, H - 1);
        bw = $urandom_range(3, 14); bh = $urandom_range(3, 14);
        v = (b % 2) ? $urandom_range(180, 255) : $urandom_range(0, 50);
        for (int y = by; y < by + bh && y < H; y++)
          for (int x = bx; x < bx + bw && x < W; x++) img[0][y * W + x] = 8'(v);
      end
      for (int s = 1; s < 4; s++) begin int w2, h2; downsample(img[s-1], ws[s-1], hs[s-1], img[s], w2, h2); end
      exp_feat.delete();
      nexp = 0; nkp_tot = 0; nnms_tot = 0;
      for (int s = 0; s < 4; s++) begin
        ref_scale(s, int'(cfg_t), int'(cfg_tn));
        got_x[s].delete(); got_y[s].delete();
        nkp_tot += exp_x[s].size(); nnms_tot += n_nms[s];
      end
      // expected features
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < exp_x[s].size(); k++) begin
          int x, y;
          x = exp_x[s][k]; y = exp_y[s][k];
          if (x >= 21 && x + 21 < ws[s] && y >= 21 && y + 21 < hs[s]) begin
            exp_feat[key(s, x, y)] = 1; nexp++;
          end
        end
      nborder0 = int'(n_border); nfeat0 = n_feat;
      fq.delete();
      // stream the frame without gaps; the accelerator pads it
      @(negedge clk);
      t0 = $time;
      for (int i = 0; i < W * H; i++) begin
        in_valid = 1; in_sof = (i == 0); in_pix = img[0][i];
        @(negedge clk);
      end
      in_valid = 0; in_sof = 0;
      while (!in_ready) @(negedge clk);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != W * (H + PAD)) fail($sformatf("frame took %0d slots", (t1 - t0) / 10));
      // the stored smoothed images are complete once the padding has passed
      repeat (200) @(posedge clk);
      st0 = new[ws[0] * hs[0]]; st2 = new[ws[2] * hs[2]];
      for (int i = 0; i < ws[0] * hs[0]; i++) st0[i] = u_mem.mem[i];
      for (int i = 0; i < ws[2] * hs[2]; i++) st2[i] = u_mem.mem[BASE2 + i];
      for (int y = 2; y < H - 2; y++)
        for (int x = 2; x < W - 2; x++) begin
          checks++;
          if (int'(st0[y * W + x]) != smooth(img[0], W, x, y)) fail($sformatf("stored scale 0 (%0d,%0d)", x, y));
        end
      for (int y = 2; y < hs[2] - 2; y++)
        for (int x = 2; x < ws[2] - 2; x++) begin
          checks++;
          if (int'(st2[y * ws[2] + x]) != smooth(img[2], ws[2], x, y)) fail($sformatf("stored scale 2 (%0d,%0d)", x, y));
        end
      // wait until every expected feature has come out and the loader is idle
      begin
        int quiet;
        quiet = 0;
        while (quiet < 5000) begin
          @(posedge clk);
          if (int'(dut.u_loader.state) == 0 && !dut.kb_valid && !f_valid) quiet++;
          else quiet = 0;
        end
      end
      while (fq.size() > 0) check_feature(fq.pop_front());
      // keypoints per scale
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (got_x[s].size() != exp_x[s].size())
          fail($sformatf("frame %0d scale %0d: %0d keypoints, expected %0d", f, s, got_x[s].size(), exp_x[s].size()));
        for (int k = 0; k < got_x[s].size() && k < exp_x[s].size(); k++) begin
          checks++;
          if (got_x[s][k] != exp_x[s][k] || got_y[s][k] != exp_y[s][k])
            fail($sformatf("scale %0d kp %0d (%0d,%0d) expected (%0d,%0d)", s, k,
                           got_x[s][k], got_y[s][k], exp_x[s][k], exp_y[s][k]));
        end
      end
      checks++;
      if (n_feat - nfeat0 != nexp) fail($sformatf("%0d features, expected %0d", n_feat - nfeat0, nexp));
      checks++;
      if (int'(n_border) - nborder0 != nkp_tot - nexp)
        fail($sformatf("border drops %0d, expected %0d", int'(n_border) - nborder0, nkp_tot - nexp));
      if (f > 0) m_drop += nnms_tot - nkp_tot;
      $display("frame %0d tn=%0d: NMS survivors %0d, keypoints %0d (%0d/%0d/%0d/%0d), features %0d",
               f, cfg_tn, nnms_tot, nkp_tot, exp_x[0].size(), exp_x[1].size(), exp_x[2].size(),
               exp_x[3].size(), nexp);
    end
    checks++;
    if (rec_overrun != 0 || kp_overflow != 0 || sm_overflow != 0) fail("overflow flag raised");
    $display("features per scale %0d %0d %0d %0d; bytes fetched %0d, reuse %0d, border %0d",
             m_feat[0], m_feat[1], m_feat[2], m_feat[3], n_fetch, n_reuse, n_border);
    $display("padding cycles %0d, memory stalls %0d (read %0d), loader waits %0d, buffer full %0d, back-pressure %0d, threshold drops %0d",
             m_pad, u_mem.n_stall, m_stall_rd, m_wait, m_full, m_bp, m_drop);
    for (int s = 0; s < 4; s++) begin
      checks++; if (m_feat[s] == 0) fail($sformatf("no feature on scale %0d", s));
    end
    checks++; if (m_pad == 0) fail("no padding");
    checks++; if (n_reuse == 0) fail("no column reuse");
    checks++; if (n_border == 0) fail("no border drop");
    checks++; if (u_mem.n_stall == 0) fail("no memory stall");
    checks++; if (m_wait == 0) fail("loader never waited for rows");
    checks++; if (m_full == 0) fail("descriptor buffer never full");
    checks++; if (m_bp == 0) fail("no output back-pressure");
    checks++; if (m_drop == 0) fail("score threshold removed nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
