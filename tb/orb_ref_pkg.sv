// orb_ref_pkg: reference models used by the testbenches, written from the
// algorithm definitions rather than from the RTL structure.
//  * FAST-9 by searching every start of a nine-pixel arc; score = sum of
//    |I - Ic| over the pixels lying on some passing arc.
//  * Full 3x3 non-maximum suppression (strictly higher neighbour suppresses).
//  * 5x5 binomial smoothing by direct convolution, 1.25x downsampling by
//    explicit weights.
//  * Orientation with real-valued atan2, descriptor with real-valued rotation
//    tables rounded the same way as the hardware (Q8 sine table).
package orb_ref_pkg;
  typedef byte unsigned img_t [];

  localparam int DX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  localparam int DY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};

  function automatic int px(const ref img_t im, input int w, input int x, input int y);
    return int'(im[y * w + x]);
  endfunction

  // FAST-9 on pixel (x, y); returns corner flag, score through outputs.
  function automatic void fast(const ref img_t im, input int w, input int x, input int y,
                               input int t, output bit corner, output int score);
    int c;
    bit [15:0] pd, pb, m;
    c = px(im, w, x, y);
    for (int i = 0; i < 16; i++) begin
      int v;
      v = px(im, w, x + DX[i], y + DY[i]);
      pd[i] = v < c - t;
      pb[i] = v > c + t;
    end
    m = 0;
    for (int s = 0; s < 16; s++) begin
      bit rd, rb;
      rd = 1; rb = 1;
      for (int j = 0; j < 9; j++) begin rd &= pd[(s + j) % 16]; rb &= pb[(s + j) % 16]; end
      for (int j = 0; j < 9; j++) if (rd || rb) m[(s + j) % 16] = 1'b1;
    end
    corner = (m != 0);
    score = 0;
    for (int i = 0; i < 16; i++)
      if (m[i]) begin
        int v;
        v = px(im, w, x + DX[i], y + DY[i]);
        score += (v > c) ? v - c : c - v;
      end
  endfunction

  function automatic int smooth(const ref img_t im, input int w, input int x, input int y);
    int k [5] = '{1, 4, 6, 4, 1};
    int acc;
    acc = 0;
    for (int r = -2; r <= 2; r++)
      for (int q = -2; q <= 2; q++) acc += k[r + 2] * k[q + 2] * px(im, w, x + q, y + r);
    return acc / 256;
  endfunction

  function automatic int ds_len(int n);
    int r;
    r = n % 5;
    return 4 * (n / 5) + ((r == 0) ? 0 : (r == 1) ? 1 : r - 1);
  endfunction

  // Output k of a group uses source 5J+k (weight 4-k) and 5J+k+1 (weight k).
  function automatic int lerp(int a, int b, int k);
    return ((4 - k) * a + k * b) / 4;
  endfunction

  function automatic int ds_px(const ref img_t im, input int w, input int X, input int Y);
    int sx, sy, kx, ky, h0, h1;
    kx = X % 4; ky = Y % 4;
    sx = 5 * (X / 4) + kx; sy = 5 * (Y / 4) + ky;
    h0 = (kx == 0) ? px(im, w, sx, sy) : lerp(px(im, w, sx, sy), px(im, w, sx + 1, sy), kx);
    if (ky == 0) return h0;
    h1 = (kx == 0) ? px(im, w, sx, sy + 1) : lerp(px(im, w, sx, sy + 1), px(im, w, sx + 1, sy + 1), kx);
    return lerp(h0, h1, ky);
  endfunction

  function automatic void downsample(const ref img_t im, input int w, input int h,
                                     ref img_t o, output int w2, output int h2);
    w2 = ds_len(w); h2 = ds_len(h);
    o = new[w2 * h2];
    for (int y = 0; y < h2; y++)
      for (int x = 0; x < w2; x++) o[y * w2 + x] = 8'(ds_px(im, w, x, y));
  endfunction

  // Orientation id of a 43x43 patch (raster, centre at 21,21).
  function automatic int orient(const ref img_t p, output longint mx, output longint my,
                                output real ang);
    real a;
    mx = 0; my = 0;
    for (int dy = -21; dy <= 21; dy++)
      for (int dx = -21; dx <= 21; dx++)
        if (dx * dx + dy * dy <= 225) begin
          mx += dx * px(p, 43, dx + 21, dy + 21);
          my += dy * px(p, 43, dx + 21, dy + 21);
        end
    if (mx == 0 && my == 0) begin ang = 0; return 0; end
    a = $atan2(real'(my), real'(mx)) * 180.0 / 3.14159265358979;
    if (a < 0) a += 360.0;
    ang = a;
    return int'($floor((a + 5.625) / 11.25)) % 32;
  endfunction

  // Distance in degrees from a to the nearest bin boundary.
  function automatic real bin_margin(real a);
    real f;
    f = (a + 5.625) / 11.25;
    f = f - $floor(f);
    return ((f < 0.5) ? f : 1.0 - f) * 11.25;
  endfunction

  // Test pattern: 32-bit xorshift (13, 17, 5) from seed 0x2545F491, four
  // words per test, coordinate = (v mod 31) - 15.
  function automatic void pattern(output int ax [256], output int ay [256],
                                  output int bx [256], output int by [256]);
    bit [31:0] v;
    v = 32'h2545F491;
    for (int i = 0; i < 256; i++) begin
      v ^= v << 13; v ^= v >> 17; v ^= v << 5; ax[i] = int'(v % 31) - 15;
      v ^= v << 13; v ^= v >> 17; v ^= v << 5; ay[i] = int'(v % 31) - 15;
      v ^= v << 13; v ^= v >> 17; v ^= v << 5; bx[i] = int'(v % 31) - 15;
      v ^= v << 13; v ^= v >> 17; v ^= v << 5; by[i] = int'(v % 31) - 15;
    end
  endfunction

  function automatic int q8sin(int id);
    return int'($floor(256.0 * $sin(real'(id) * 11.25 * 3.14159265358979 / 180.0) + 0.5));
  endfunction

  function automatic int rdiv(int v);  // round(v / 256), halves up
    return int'($floor((real'(v) + 128.0) / 256.0));
  endfunction

  function automatic bit [255:0] descriptor(const ref img_t p, input int id);
    int ax [256], ay [256], bx [256], by [256];
    int c, s;
    bit [255:0] d;
    pattern(ax, ay, bx, by);
    c = q8sin((id + 8) % 32);
    s = q8sin(id);
    for (int i = 0; i < 256; i++) begin
      int xa, ya, xb, yb;
      xa = rdiv(ax[i] * c - ay[i] * s); ya = rdiv(ay[i] * c + ax[i] * s);
      xb = rdiv(bx[i] * c - by[i] * s); yb = rdiv(by[i] * c + bx[i] * s);
      d[i] = px(p, 43, xa + 21, ya + 21) < px(p, 43, xb + 21, yb + 21);
    end
    return d;
  endfunction
endpackage
