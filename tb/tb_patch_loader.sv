// Testbench for patch_loader: random images stand in for the two stored
// scales in an external-memory model. Keypoints of all four scales are sent,
// often several in one row so that columns are reused, some near the border.
// Each streamed patch is compared with the reference crop (scales 1, 3) or
// the reference 1.25x downsampled crop (scales 2, 4); the number of bytes
// fetched per keypoint, the first-column slot and the border drops are
// checked, and the loader must wait while the needed rows are not yet stored.
module tb_patch_loader;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  localparam int W = 200, H = 120, BASE2 = W * H;
  localparam int W2 = 128, H2 = 77;   // scale_len(200, 2), scale_len(120, 2)
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic kp_valid = 0, kp_ready, room = 1, desc_done = 0;
  kps_t kp, cur_kp;
  coord_t rows_done0 = 0, rows_done2 = 0;
  logic rd_valid, rd_ready, rsp_valid;
  logic [ADDR_W-1:0] rd_addr;
  pix_t rsp_data;
  logic rw_en, pw_en, o_valid, o_first, busy;
  logic [5:0] rw_slot, rw_row, ra_slot, ra_row, pw_col, pw_row, cur_kslot;
  pix_t rw_data, ra_data, pw_data, o_pix;
  logic [31:0] n_fetch, n_reuse, n_border;
  logic [5:0] rb_slot = 0, rb_row = 0;
  pix_t rb_data;
  img_t im0, im2;
  pix_t got [$];
  int nwait = 0;

  patch_loader #(.W(W), .H(H), .BASE0(0), .BASE2(BASE2)) dut (
    .clk(clk), .rst_n(rst_n), .kp_valid(kp_valid), .kp_ready(kp_ready), .kp(kp),
    .room(room), .desc_done(desc_done), .new_frame(1'b0), .rows_done0(rows_done0), .rows_done2(rows_done2),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_addr(rd_addr),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data),
    .rw_en(rw_en), .rw_slot(rw_slot), .rw_row(rw_row), .rw_data(rw_data),
    .ra_slot(ra_slot), .ra_row(ra_row), .ra_data(ra_data),
    .pw_en(pw_en), .pw_col(pw_col), .pw_row(pw_row), .pw_data(pw_data),
    .o_valid(o_valid), .o_first(o_first), .o_pix(o_pix),
    .cur_kp(cur_kp), .cur_kslot(cur_kslot),
    .n_fetch(n_fetch), .n_reuse(n_reuse), .n_border(n_border), .busy(busy));

  reuse_buffer u_reuse (.clk(clk), .we(rw_en), .w_slot(rw_slot), .w_row(rw_row), .w_data(rw_data),
    .ra_slot(ra_slot), .ra_row(ra_row), .ra_data(ra_data),
    .rb_slot(rb_slot), .rb_row(rb_row), .rb_data(rb_data));

  ext_mem_model #(.SIZE(1 << 16), .LAT(5), .STALL_PCT(25)) u_mem (.clk(clk),
    .wr0_valid(1'b0), .wr0_ready(), .wr0_addr('0), .wr0_data('0),
    .wr2_valid(1'b0), .wr2_ready(), .wr2_addr('0), .wr2_data('0),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_addr(rd_addr),
    .rsp_valid(rsp_valid), .rsp_data(rsp_data));

  always #5 clk = ~clk;

  int npw = 0;
  always @(posedge clk) if (rst_n) begin
    if (o_valid) got.push_back(o_pix);
    if (pw_en) begin
      npw++;
      checks++;
      if (pw_data !== o_pix || int'(pw_col) != (npw - 1) % 43 || int'(pw_row) != ((npw - 1) / 43) % 43) failures++;
    end
  end

  function automatic int ref_px(int s, int x, int y);
    if (s == 0) return px(im0, W, x, y);
    if (s == 2) return px(im2, W2, x, y);
    if (s == 1) return ds_px(im0, W, x, y);
    return ds_px(im2, W2, x, y);
  endfunction

  function automatic int srcc(int v);
    return 5 * (v / 4) + v % 4;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ws [4], hs [4];
    int px_, py_, ps_;
    bit have_prev;
    ws = '{200, 160, 128, 102};
    hs = '{120, 96, 77, 61};
    npw = 0; nwait = 0; have_prev = 0;
    im0 = new[W * H]; im2 = new[W2 * H2];
    for (int i = 0; i < W * H; i++) begin im0[i] = 8'($urandom); u_mem.mem[i] = im0[i]; end
    for (int i = 0; i < W2 * H2; i++) begin im2[i] = 8'($urandom); u_mem.mem[BASE2 + i] = im2[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 70; n++) begin
      int s, x, y, f0, nf, border, d;
      bit reuse;
      if (have_prev && $urandom_range(0, 1) == 1) begin
        s = ps_; y = py_; x = px_ + $urandom_range(1, 50);
      end else begin
        s = $urandom_range(0, 3);
        x = $urandom_range(15, ws[s] - 16);
        y = $urandom_range(15, hs[s] - 16);
      end
      border = (x < 21 || x + 21 >= ws[s] || y < 21 || y + 21 >= hs[s]);
      reuse = !border && have_prev && s == ps_ && y == py_ && x > px_ && x - px_ < 43;
      d = reuse ? x - px_ : 43;
      if (s % 2 == 0) nf = d * 43;
      else begin
        int c0, c1, r0, r1;
        c0 = x + 21 - d + 1; c1 = x + 21; r0 = y - 21; r1 = y + 21;
        nf = (srcc(c1) + (c1 % 4 != 0) - srcc(c0) + 1) * (srcc(r1) + (r1 % 4 != 0) - srcc(r0) + 1);
      end
      // stored rows lag behind for the first keypoints
      if (n < 4) begin rows_done0 = 0; rows_done2 = 0; end
      else begin rows_done0 = coord_t'(H); rows_done2 = coord_t'(H2); end
      got.delete();
      f0 = n_fetch;
      @(negedge clk);
      kp_valid = 1; kp = '{scale: 2'(s), x: coord_t'(x), y: coord_t'(y)};
      #1;
      while (!kp_ready) begin @(negedge clk); #1; end
      @(negedge clk); kp_valid = 0;
      if (border) begin
        repeat (3) @(posedge clk);
        checks++;
        if (busy || int'(n_border) == 0) failures++;
        continue;
      end
      if (n < 4) begin
        repeat (30) @(posedge clk);
        checks++;
        if (rd_valid || got.size() != 0) begin failures++; $display("read before rows were stored"); end
        nwait++;
        rows_done0 = coord_t'(H); rows_done2 = coord_t'(H2);
      end
      while (got.size() < 43 * 43) @(posedge clk);
      checks++;
      if (int'(n_fetch) - f0 != nf) begin failures++; $display("kp %0d scale %0d: fetched %0d expected %0d", n, s, int'(n_fetch) - f0, nf); end
      checks++;
      if (int'(cur_kslot) != (x - 21) % 43) failures++;
      for (int i = 0; i < 43 * 43; i++) begin
        int e;
        e = ref_px(s, x - 21 + i % 43, y - 21 + i / 43);
        checks++;
        if (int'(got[i]) != e) begin
          failures++;
          if (failures < 6) $display("kp %0d scale %0d (%0d,%0d) pixel %0d: %0d expected %0d", n, s, x, y, i, got[i], e);
        end
      end
      repeat ($urandom_range(1, 20)) @(posedge clk);
      @(negedge clk); desc_done = 1;
      @(negedge clk); desc_done = 0;
      px_ = x; py_ = y; ps_ = s; have_prev = 1;
    end
    checks++; if (n_reuse == 0 || n_border == 0 || nwait == 0) begin failures++; $display("reuse %0d border %0d", n_reuse, n_border); end
    $display("reuse %0d border %0d fetched %0d", n_reuse, n_border, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
