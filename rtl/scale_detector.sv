// scale_detector: everything that works on one scale of the image pyramid.
//
// The scale receives its image as a raster stream (in_valid, in_sof on the
// first pixel, one pixel per cycle at most) of W x H pixels followed by a few
// padding rows that flush the pipeline. Seven row FIFOs and a 7x7 register
// file form a sliding window; FAST-9 detection, 5x5 smoothing and 1.25x
// downsampling read it concurrently.
//  * Keypoint path: the window centre is 3 columns and 4 rows behind the
//    accepted pixel. FAST results for centres at least 3 pixels inside the
//    frame go through the 3x3 NMS and the score recorder; surviving
//    keypoints leave on kp_valid/kp (coordinates of this scale).
//  * Smoothing path (HAS_SMOOTH): the smoothed value of every frame pixel
//    leaves on sm_valid with its coordinates, in raster order, for storage in
//    external memory. Values within 2 pixels of the frame border are not
//    meaningful (the window wraps there); no patch reaches that far.
//  * Downsampling path (HAS_DS): the newest 2x2 corner of the window gives
//    the next scale's stream on ds_valid/ds_sof/ds_pix; padding rows are
//    downsampled too and become the next scale's padding.
// Outputs are registered; there is no back-pressure anywhere in this path.
// The split into units and the window sizes follow the described detector;
// the coordinate bookkeeping and padding-row flush are this design's own.
module scale_detector
  import orb_pkg::*;
#(
  parameter int W           = 1920,
  parameter int H           = 1080,
  parameter bit HAS_DS      = 1'b1,
  parameter bit HAS_SMOOTH  = 1'b1,
  parameter int LOCAL_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pix_t       t,
  input  logic [7:0] tn,
  input  logic       in_valid,
  input  logic       in_sof,
  input  pix_t       in_pix,
  // next scale
  output logic       ds_valid,
  output logic       ds_sof,
  output pix_t       ds_pix,
  // smoothed image
  output logic       sm_valid,
  output pix_t       sm_pix,
  output coord_t     sm_x,
  output coord_t     sm_y,
  // keypoints
  output logic       kp_valid,
  output kp_t        kp,
  output logic       overrun,
  // raw per-pixel FAST result (observation of the detector)
  output logic       fast_valid,
  output logic       fast_corner
);
  // ---- input coordinates ------------------------------------------------
  coord_t x_cnt, y_cnt, cur_x, cur_y;
  assign cur_x = in_sof ? '0 : x_cnt;
  assign cur_y = in_sof ? '0 : y_cnt;

  // coordinates of the pixel accepted on the last window update
  coord_t wx, wy;
  logic   win_upd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt   <= '0;
      y_cnt   <= '0;
      wx      <= '0;
      wy      <= '0;
      win_upd <= 1'b0;
    end else begin
      win_upd <= in_valid;
      if (in_valid) begin
        wx <= cur_x;
        wy <= cur_y;
        if (cur_x == coord_t'(W - 1)) begin
          x_cnt <= '0;
          if (cur_y != '1) y_cnt <= cur_y + 1'b1;
        end else begin
          x_cnt <= cur_x + 1'b1;
          y_cnt <= cur_y;
        end
      end
    end
  end

  // ---- window -------------------------------------------------------------
  pix_t rows [7];
  pix_t win  [7][7];

  source_buffer #(.ROW_LEN(W), .NROWS(7)) u_src (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .in_pix(in_pix), .rows(rows)
  );
  window_regfile #(.N(7)) u_win (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .col_in(rows), .win(win)
  );

  // Window centre: 3 columns left of and 4 rows above the newest column, which
  // itself is one row above the accepted pixel.
  logic signed [COORD_W+1:0] cx, cy;
  always_comb begin
    if (wx >= coord_t'(3)) begin
      cx = $signed({2'b0, wx}) - 3;
      cy = $signed({2'b0, wy}) - 4;
    end else begin
      cx = $signed({2'b0, wx}) + W - 3;
      cy = $signed({2'b0, wy}) - 5;
    end
  end

  logic c_in_frame, c_fast_ok;
  assign c_in_frame = (cy >= 0) && (cy < H);
  assign c_fast_ok  = (cx >= 3) && (cx <= W - 4) && (cy >= 3) && (cy <= H - 4);

  // ---- keypoint path ------------------------------------------------------
  logic   corner;
  score_t score;
  fast_detector u_fast (.win(win), .t(t), .corner(corner), .score(score));

  logic   nms_en;
  logic   nms_valid, nms_kp;
  score_t nms_score;
  coord_t nms_x, nms_y;
  assign nms_en = win_upd && (cy >= 0);
  assign fast_valid  = win_upd && c_fast_ok;
  assign fast_corner = corner;

  nms_3x3 #(.W(W)) u_nms (
    .clk(clk), .rst_n(rst_n), .en(nms_en),
    .in_flag(corner && c_fast_ok), .in_score(score),
    .in_x(coord_t'(cx)), .in_y(coord_t'(cy)),
    .out_valid(nms_valid), .out_kp(nms_kp), .out_score(nms_score),
    .out_x(nms_x), .out_y(nms_y)
  );

  score_recorder #(.W(W), .LOCAL_DEPTH(LOCAL_DEPTH)) u_rec (
    .clk(clk), .rst_n(rst_n), .t(t), .tn(tn),
    .en(nms_valid && (nms_y < coord_t'(H))), .in_kp(nms_kp), .in_score(nms_score),
    .in_x(nms_x), .in_y(nms_y),
    .kp_valid(kp_valid), .kp(kp), .overrun(overrun)
  );

  // ---- smoothing path -----------------------------------------------------
  if (HAS_SMOOTH) begin : g_smooth
    pix_t smooth;
    smoothing_unit u_smooth (.win(win), .smooth(smooth));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sm_valid <= 1'b0;
        sm_pix   <= '0;
        sm_x     <= '0;
        sm_y     <= '0;
      end else begin
        sm_valid <= win_upd && c_in_frame;
        sm_pix   <= smooth;
        sm_x     <= coord_t'(cx);
        sm_y     <= coord_t'(cy);
      end
    end
  end else begin : g_no_smooth
    assign sm_valid = 1'b0;
    assign sm_pix   = '0;
    assign sm_x     = '0;
    assign sm_y     = '0;
  end

  // ---- downsampling path --------------------------------------------------
  if (HAS_DS) begin : g_ds
    logic       dsv;
    pix_t       dsp;
    logic [2:0] px, py;
    coord_t     ry;   // source row of the newest window row
    assign ry = wy - 1'b1;
    assign px = 3'(wx % 5);
    assign py = 3'(ry % 5);
    downsampler u_ds (
      .cur(win[0][0]), .left(win[0][1]), .up(win[1][0]), .up_left(win[1][1]),
      .px(px), .py(py), .valid(dsv), .dout(dsp)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ds_valid <= 1'b0;
        ds_sof   <= 1'b0;
        ds_pix   <= '0;
      end else begin
        ds_valid <= win_upd && (wy != '0) && dsv;
        ds_sof   <= (wx == '0) && (wy == coord_t'(1));
        ds_pix   <= dsp;
      end
    end
  end else begin : g_no_ds
    assign ds_valid = 1'b0;
    assign ds_sof   = 1'b0;
    assign ds_pix   = '0;
  end
endmodule
