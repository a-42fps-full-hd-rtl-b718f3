// Testbench for scale_detector: random frames with bright and dark blobs are
// streamed with random gaps, followed by zero padding rows. Checked against
// the reference models:
//  * every FAST result (raster order over centres 3 pixels inside the frame),
//  * every smoothed pixel at least 2 pixels inside the frame,
//  * the downsampled stream of the next scale (size and every pixel),
//  * the keypoint list: full 3x3 NMS of the FAST flags followed by the
//    per-segment threshold of the score recorder, recomputed from its
//    definition (eight steps from 9t to 4080, pointer = first step whose
//    count is below tn, eq. for ts). Frame 0 uses tn = 255 (all NMS survivors
//    pass), frames 1 and 2 small tn so that the threshold acts.
// Every pixel is accepted on the cycle it is offered (one pixel per cycle).
module tb_scale_detector;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  localparam int W = 48, H = 30, PAD = 8, FRAMES = 3;
  localparam int W2 = 4 * (W / 5) + ((W % 5 == 0) ? 0 : (W % 5 == 1) ? 1 : W % 5 - 1);
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  pix_t t;
  logic [7:0] tn;
  logic in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic ds_valid, ds_sof, sm_valid, kp_valid, overrun, fast_valid, fast_corner;
  pix_t ds_pix, sm_pix;
  coord_t sm_x, sm_y;
  kp_t kp;

  scale_detector #(.W(W), .H(H), .HAS_DS(1'b1), .HAS_SMOOTH(1'b1), .LOCAL_DEPTH(64)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .tn(tn),
    .in_valid(in_valid), .in_sof(in_sof), .in_pix(in_pix),
    .ds_valid(ds_valid), .ds_sof(ds_sof), .ds_pix(ds_pix),
    .sm_valid(sm_valid), .sm_pix(sm_pix), .sm_x(sm_x), .sm_y(sm_y),
    .kp_valid(kp_valid), .kp(kp), .overrun(overrun),
    .fast_valid(fast_valid), .fast_corner(fast_corner)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t im, ds_ref;
  int   w2, h2;
  bit   fl [H][W];
  int   sc [H][W];
  int   n_fast = 0, n_sm = 0, n_ds = 0, n_dsall = 0, n_fast_corner = 0;
  int   kx [$], ky [$];
  int   fail_print = 0;

  task automatic fail(string s);
    failures++;
    if (fail_print++ < 8) $display("FAIL %s", s);
  endtask

  // Monitors --------------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (fast_valid) begin
      int x, y;
      x = 3 + n_fast % (W - 6);
      y = 3 + n_fast / (W - 6);
      checks++;
      if (y >= H - 3) fail("extra FAST result");
      else if (fast_corner !== fl[y][x]) fail($sformatf("FAST (%0d,%0d) %b", x, y, fast_corner));
      n_fast++;
      if (fast_corner) n_fast_corner++;
    end
    if (sm_valid) begin
      if (int'(sm_x) != n_sm % W || int'(sm_y) != n_sm / W) fail("smooth coordinates");
      if (sm_x >= 2 && sm_x < W - 2 && sm_y >= 2 && sm_y < H - 2) begin
        checks++;
        if (int'(sm_pix) != smooth(im, W, sm_x, sm_y)) fail($sformatf("smooth (%0d,%0d)", sm_x, sm_y));
      end
      n_sm++;
    end
    if (ds_valid) begin
      int k;
      k = ds_sof ? 0 : n_dsall;
      if (k < w2 * h2) begin
        checks++;
        if (ds_pix !== ds_ref[k]) fail($sformatf("ds %0d: %0d vs %0d", k, ds_pix, ds_ref[k]));
        n_ds++;
      end
      n_dsall = k + 1;
    end
    if (kp_valid) begin
      kx.push_back(int'(kp.x));
      ky.push_back(int'(kp.y));
    end
  end

  // Reference keypoint list of the current frame.
  function automatic void ref_kps(int tt, int ttn, ref int ex [$], ref int ey [$]);
    int S [8];
    ex.delete(); ey.delete();
    for (int j = 0; j < 8; j++) S[j] = 9 * tt + ((4080 - 9 * tt) * j) / 8;
    for (int y = 0; y < H; y++)
      for (int j = 0; j < 8; j++) begin
        int x0, x1, N [8], ptr, ts;
        x0 = (j * W) / 8; x1 = ((j + 1) * W) / 8 - 1;
        for (int k = 0; k < 8; k++) N[k] = 0;
        for (int x = x0; x <= x1; x++)
          if (is_max(x, y)) for (int k = 0; k < 8; k++) if (sc[y][x] > S[k]) N[k]++;
        ptr = 7;
        for (int k = 7; k >= 0; k--) if (N[k] < ttn) ptr = k;
        ts = (ptr == 0 || N[ptr] > ttn / 2) ? S[ptr] : (S[ptr] + S[ptr - 1]) / 2;
        for (int x = x0; x <= x1; x++)
          if (is_max(x, y) && sc[y][x] > ts) begin ex.push_back(x); ey.push_back(y); end
      end
  endfunction

  function automatic bit is_max(int x, int y);
    if (!fl[y][x]) return 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dx || dy) && x + dx >= 0 && x + dx < W && y + dy >= 0 && y + dy < H)
          if (fl[y + dy][x + dx] && sc[y + dy][x + dx] > sc[y][x]) return 0;
    return 1;
  endfunction

  initial begin
    int ex [$], ey [$];
    int nmax;
    im = new[W * H];
    t = 8'd20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      tn = (f == 0) ? 8'd255 : 8'(f);
      // image: noise plus blobs
      for (int i = 0; i < W * H; i++) im[i] = 8'(100 + $urandom_range(0, 30));
      for (int b = 0; b < 25; b++) begin
        int bx, by, bw, bh, v;
        bx = $urandom_range(0, W - 1); by = $urandom_range(0, H - 1);
        bw = $urandom_range(1, 6); bh = $urandom_range(1, 6);
        v = (b % 2) ? $urandom_range(200, 255) : $urandom_range(0, 40);
        for (int y = by; y < by + bh && y < H; y++)
          for (int x = bx; x < bx + bw && x < W; x++) im[y * W + x] = 8'(v);
      end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          fl[y][x] = 0; sc[y][x] = 0;
          if (x >= 3 && x < W - 3 && y >= 3 && y < H - 3) begin
            bit c; int s;
            fast(im, W, x, y, int'(t), c, s);
            fl[y][x] = c; sc[y][x] = s;
          end
        end
      downsample(im, W, H, ds_ref, w2, h2);
      ref_kps(int'(t), int'(tn), ex, ey);
      n_fast = 0; n_sm = 0; n_ds = 0; n_fast_corner = 0;
      kx.delete(); ky.delete();
      // stream frame and padding, with gaps
      for (int i = 0; i < W * (H + PAD); i++) begin
        @(negedge clk);
        while ($urandom_range(0, 9) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_sof = (i == 0);
        in_pix = (i < W * H) ? im[i] : 8'd0;
      end
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      repeat (300) @(posedge clk);
      // totals
      checks++;
      if (n_fast != (W - 6) * (H - 6)) fail($sformatf("FAST results %0d", n_fast));
      checks++;
      if (n_sm != W * H) fail($sformatf("smoothed pixels %0d", n_sm));
      checks++;
      if (n_ds != w2 * h2) fail($sformatf("downsampled pixels %0d of %0d", n_ds, w2 * h2));
      checks++;
      if (kx.size() != ex.size()) fail($sformatf("frame %0d: %0d keypoints, expected %0d", f, kx.size(), ex.size()));
      for (int k = 0; k < kx.size() && k < ex.size(); k++) begin
        checks++;
        if (kx[k] != ex[k] || ky[k] != ey[k])
          fail($sformatf("kp %0d (%0d,%0d) expected (%0d,%0d)", k, kx[k], ky[k], ex[k], ey[k]));
      end
      nmax = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) if (is_max(x, y)) nmax++;
      $display("frame %0d tn=%0d: corners %0d, NMS survivors %0d, keypoints %0d",
               f, tn, n_fast_corner, nmax, kx.size());
      // the frame must exercise the detector and, for small tn, the threshold
      checks++;
      if (n_fast_corner < 20) fail("too few corners");
      checks++;
      if (f > 0 && kx.size() >= nmax) fail("score threshold removed nothing");
    end
    checks++;
    if (overrun) fail("overrun");
    checks++;
    if (W2 != w2) fail("ds width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
