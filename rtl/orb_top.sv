// orb_top: ORB feature-extraction accelerator (oriented FAST keypoints with
// rotated BRIEF descriptors) over a four-scale image pyramid.
//
// The pipeline is loosely coupled through the global keypoint FIFOs:
//  * Detection side, one pixel per cycle. The grey-level frame (W x H) enters
//    on a valid/ready stream with a start-of-frame flag. A frame controller
//    follows every frame with PAD_ROWS rows of zeros that flush the window
//    pipelines of all scales (in_ready is low meanwhile). Four scale
//    detectors run in parallel, each feeding the next with its 1.25x
//    downsampled image; each finds FAST-9 corners, suppresses non-maxima in
//    3x3 and keeps those above its adaptive per-segment score threshold.
//    Scales 1 and 3 are also smoothed and written to external memory through
//    two write channels (addresses BASE0 and BASE2, one byte per beat).
//  * Descriptor side, one keypoint at a time. The patch loader takes
//    keypoints from the four FIFOs, loads the 43 x 43 smoothed patch (from
//    the stored scale below, downsampled, for scales 2 and 4), reusing the
//    columns shared with the previous keypoint of the same row. While the
//    patch streams into the patch buffer the orientation unit accumulates
//    the intensity centroid; 22 cycles after the last pixel the 32-level
//    orientation is known and descriptor generation makes 256 rotated binary
//    tests, one per cycle, reading pixel a from the reuse buffer and pixel b
//    from the patch buffer. Finished features leave through the descriptor
//    buffer on a valid/ready stream.
// The external memory itself is outside this design: the read channel is a
// valid/ready address request with in-order one-byte responses (rsp_valid).
// Status outputs count what the descriptor side did and flag any data lost
// to full buffers.
module orb_top
  import orb_pkg::*;
#(
  parameter int W           = 1920,
  parameter int H           = 1080,
  parameter int PAD_ROWS    = 20,
  parameter int LOCAL_DEPTH = 256,
  parameter int KP_DEPTH    = 512,
  parameter int SM_DEPTH    = 3840,
  parameter int DESC_DEPTH  = 100,
  parameter int BASE0       = 0,
  parameter int BASE2       = 1920 * 1080
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pix_t              cfg_t,       // FAST threshold
  input  logic [7:0]        cfg_tn,      // keypoints per segment (score recorder)
  // image input
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_sof,
  input  pix_t              in_pix,
  // smoothed-image write channels (scale 1 and scale 3)
  output logic              wr0_valid,
  input  logic              wr0_ready,
  output logic [ADDR_W-1:0] wr0_addr,
  output pix_t              wr0_data,
  output logic              wr2_valid,
  input  logic              wr2_ready,
  output logic [ADDR_W-1:0] wr2_addr,
  output pix_t              wr2_data,
  // patch read channel
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rsp_valid,
  input  pix_t              rsp_data,
  // features
  output logic              f_valid,
  input  logic              f_ready,
  output feat_t             f_data,
  // status
  output logic [3:0]        kp_pulse,     // a keypoint entered the FIFO of scale s
  output logic [3:0]        rec_overrun,
  output logic [3:0]        kp_overflow,
  output logic [1:0]        sm_overflow,
  output logic [31:0]       n_fetch,
  output logic [31:0]       n_reuse,
  output logic [31:0]       n_border
);
  localparam int WS [4] = '{scale_len(W, 0), scale_len(W, 1), scale_len(W, 2), scale_len(W, 3)};
  localparam int HS [4] = '{scale_len(H, 0), scale_len(H, 1), scale_len(H, 2), scale_len(H, 3)};

  // ---- frame controller: pass W*H pixels, then PAD_ROWS rows of zeros ------
  localparam int NPIX = W * H;
  localparam int NPAD = W * PAD_ROWS;
  logic [31:0] pix_cnt, pad_cnt;
  logic        padding;
  logic        s0_valid, s0_sof;
  pix_t        s0_pix;

  assign in_ready = !padding;
  assign s0_valid = padding || in_valid;
  assign s0_sof   = !padding && in_sof;
  assign s0_pix   = padding ? '0 : in_pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt <= '0;
      pad_cnt <= '0;
      padding <= 1'b0;
    end else if (padding) begin
      if (pad_cnt == 32'(NPAD - 1)) padding <= 1'b0;
      pad_cnt <= pad_cnt + 1'b1;
    end else if (in_valid) begin
      logic [31:0] n;
      n = in_sof ? 32'd1 : pix_cnt + 1'b1;
      pix_cnt <= n;
      if (n == 32'(NPIX)) begin
        padding <= 1'b1;
        pad_cnt <= '0;
        pix_cnt <= '0;
      end
    end
  end

  // ---- four scale detectors -------------------------------------------------
  logic   sv [5];
  logic   ss [5];
  pix_t   sp [5];
  logic   sm_v [4];
  pix_t   sm_p [4];
  coord_t sm_x [4], sm_y [4];
  logic   [3:0] kpv;
  kp_t    kpd [4];
  logic   fv [4], fc [4];

  assign sv[0] = s0_valid;
  assign ss[0] = s0_sof;
  assign sp[0] = s0_pix;

  for (genvar s = 0; s < 4; s++) begin : g_scale
    scale_detector #(
      .W(WS[s]), .H(HS[s]),
      .HAS_DS(s < 3), .HAS_SMOOTH(s == 0 || s == 2),
      .LOCAL_DEPTH(LOCAL_DEPTH)
    ) u_det (
      .clk(clk), .rst_n(rst_n), .t(cfg_t), .tn(cfg_tn),
      .in_valid(sv[s]), .in_sof(ss[s]), .in_pix(sp[s]),
      .ds_valid(sv[s+1]), .ds_sof(ss[s+1]), .ds_pix(sp[s+1]),
      .sm_valid(sm_v[s]), .sm_pix(sm_p[s]), .sm_x(sm_x[s]), .sm_y(sm_y[s]),
      .kp_valid(kpv[s]), .kp(kpd[s]), .overrun(rec_overrun[s]),
      .fast_valid(fv[s]), .fast_corner(fc[s])
    );
  end
  assign kp_pulse = kpv;

  // ---- smoothed images to external memory -----------------------------------
  coord_t rows_done0, rows_done2;
  smooth_writer #(.W(WS[0]), .DEPTH(SM_DEPTH), .BASE(BASE0)) u_wr0 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sm_v[0]), .in_pix(sm_p[0]), .in_x(sm_x[0]), .in_y(sm_y[0]),
    .wr_valid(wr0_valid), .wr_ready(wr0_ready), .wr_addr(wr0_addr), .wr_data(wr0_data),
    .rows_done(rows_done0), .overflow(sm_overflow[0])
  );
  smooth_writer #(.W(WS[2]), .DEPTH(SM_DEPTH), .BASE(BASE2)) u_wr2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sm_v[2]), .in_pix(sm_p[2]), .in_x(sm_x[2]), .in_y(sm_y[2]),
    .wr_valid(wr2_valid), .wr_ready(wr2_ready), .wr_addr(wr2_addr), .wr_data(wr2_data),
    .rows_done(rows_done2), .overflow(sm_overflow[1])
  );

  // ---- global keypoint buffer -------------------------------------------------
  logic kb_valid, kb_ready;
  kps_t kb_kp;
  keypoint_buffer #(.DEPTH(KP_DEPTH)) u_kpbuf (
    .clk(clk), .rst_n(rst_n), .in_valid(kpv), .in_kp(kpd),
    .out_valid(kb_valid), .out_ready(kb_ready), .out_kp(kb_kp),
    .overflow(kp_overflow)
  );

  // ---- descriptor side --------------------------------------------------------
  logic       room, desc_done;
  logic       rw_en, pw_en, o_valid, o_first;
  logic [5:0] rw_slot, rw_row, ra_slot, ra_row, rb_slot, rb_row;
  logic [5:0] pw_col, pw_row, pr_col, pr_row;
  pix_t       rw_data, ra_data, rb_data, pw_data, pr_data, o_pix;
  kps_t       cur_kp;
  logic [5:0] cur_kslot;
  logic       ld_busy;

  patch_loader #(.W(W), .H(H), .BASE0(BASE0), .BASE2(BASE2)) u_loader (
    .clk(clk), .rst_n(rst_n),
    .kp_valid(kb_valid), .kp_ready(kb_ready), .kp(kb_kp),
    .room(room), .desc_done(desc_done), .new_frame(in_valid && in_ready && in_sof),
    .rows_done0(rows_done0), .rows_done2(rows_done2),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_addr(rd_addr),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data),
    .rw_en(rw_en), .rw_slot(rw_slot), .rw_row(rw_row), .rw_data(rw_data),
    .ra_slot(ra_slot), .ra_row(ra_row), .ra_data(ra_data),
    .pw_en(pw_en), .pw_col(pw_col), .pw_row(pw_row), .pw_data(pw_data),
    .o_valid(o_valid), .o_first(o_first), .o_pix(o_pix),
    .cur_kp(cur_kp), .cur_kslot(cur_kslot),
    .n_fetch(n_fetch), .n_reuse(n_reuse), .n_border(n_border), .busy(ld_busy)
  );

  reuse_buffer u_reuse (
    .clk(clk), .we(rw_en), .w_slot(rw_slot), .w_row(rw_row), .w_data(rw_data),
    .ra_slot(ra_slot), .ra_row(ra_row), .ra_data(ra_data),
    .rb_slot(rb_slot), .rb_row(rb_row), .rb_data(rb_data)
  );

  patch_buffer u_patch (
    .clk(clk), .we(pw_en), .w_col(pw_col), .w_row(pw_row), .w_data(pw_data),
    .r_col(pr_col), .r_row(pr_row), .r_data(pr_data)
  );

  logic       or_valid;
  logic [4:0] or_id, orient_q;
  logic signed [23:0] mx, my;
  orientation_unit u_orient (
    .clk(clk), .rst_n(rst_n),
    .in_valid(o_valid), .in_first(o_first), .in_pix(o_pix),
    .out_valid(or_valid), .out_id(or_id), .mx(mx), .my(my)
  );

  logic dg_busy;
  logic [DESC_BITS-1:0] desc;
  descriptor_gen u_desc (
    .clk(clk), .rst_n(rst_n),
    .start(or_valid), .orient(or_id), .kslot(cur_kslot), .busy(dg_busy),
    .ra_slot(rb_slot), .ra_row(rb_row), .ra_data(rb_data),
    .rb_col(pr_col), .rb_row(pr_row), .rb_data(pr_data),
    .done(desc_done), .desc(desc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) orient_q <= '0;
    else if (or_valid) orient_q <= or_id;
  end

  feat_t feat;
  assign feat = '{scale: cur_kp.scale, x: cur_kp.x, y: cur_kp.y, orient: orient_q, desc: desc};

  descriptor_buffer #(.DEPTH(DESC_DEPTH)) u_dbuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(desc_done), .in_feat(feat), .has_room(room),
    .out_valid(f_valid), .out_ready(f_ready), .out_feat(f_data)
  );
endmodule
