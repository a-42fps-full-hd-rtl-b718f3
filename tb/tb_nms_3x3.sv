// Testbench for nms_3x3: random corner maps on a small frame streamed with
// gaps; every reported result is compared with a full 3x3 maximum test.
module tb_nms_3x3;
  import orb_pkg::*;
  localparam int W = 17, H = 12, FRAMES = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic in_flag; score_t in_score; coord_t in_x, in_y;
  logic out_valid, out_kp; score_t out_score; coord_t out_x, out_y;
  bit     fl [FRAMES][H][W];
  score_t sc [FRAMES][H][W];
  int nout = 0, nkp = 0, nsup = 0;

  nms_3x3 #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .in_flag(in_flag), .in_score(in_score),
    .in_x(in_x), .in_y(in_y), .out_valid(out_valid), .out_kp(out_kp), .out_score(out_score),
    .out_x(out_x), .out_y(out_y));
  always #5 clk = ~clk;

  function automatic bit ref_kp(int f, int x, int y);
    if (!fl[f][y][x]) return 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int xx, yy;
        xx = x + dx; yy = y + dy;
        if ((dx != 0 || dy != 0) && xx >= 0 && xx < W && yy >= 0 && yy < H)
          if (fl[f][yy][xx] && sc[f][yy][xx] > sc[f][y][x]) return 0;
      end
    return 1;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int f;
    f = nout / ((H - 1) * W);
    nout++;
    checks++;
    if (f >= FRAMES || out_kp !== ref_kp(f, out_x, out_y) || out_score !== sc[f][out_y][out_x]) begin
      failures++;
      if (failures < 5) $display("(%0d,%0d) kp %b", out_x, out_y, out_kp);
    end
    else if (out_kp) nkp++;
    else if (fl[f][out_y][out_x]) nsup++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nout = 0; nkp = 0; nsup = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          fl[f][y][x] = ($urandom_range(0, 2) == 0);
          sc[f][y][x] = score_t'($urandom_range(0, 7) + (f == 0 ? 0 : 100));
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 3) == 0) begin @(negedge clk); en = 0; end
          @(negedge clk);
          en = 1; in_flag = fl[f][y][x]; in_score = sc[f][y][x]; in_x = coord_t'(x); in_y = coord_t'(y);
        end
    end
    // a few pixels of a following frame push out the end of the last one
    for (int x = 0; x < 4; x++) begin
      @(negedge clk);
      en = 1; in_flag = 0; in_score = '0; in_x = coord_t'(x); in_y = '0;
    end
    @(negedge clk); en = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != FRAMES * (H - 1) * W) begin failures++; $display("outputs %0d", nout); end
    checks++;
    if (nkp == 0 || nsup == 0) begin failures++; $display("kp %0d suppressed %0d", nkp, nsup); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
