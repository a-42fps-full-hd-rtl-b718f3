// Testbench for smooth_writer: two frames of a small image in raster order
// with gaps, a write channel with random ready. Every write must carry
// BASE + y*W + x and the pixel, in order; rows_done must count complete
// rows; overflow must stay low.
module tb_smooth_writer;
  import orb_pkg::*;
  localparam int W = 23, H = 9, BASE = 1000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, wr_ready = 0;
  pix_t in_pix, wr_data;
  coord_t in_x, in_y, rows_done;
  logic wr_valid, overflow;
  logic [ADDR_W-1:0] wr_addr;
  int exp_a [$]; pix_t exp_d [$];
  int nwr, nstall;

  smooth_writer #(.W(W), .DEPTH(8), .BASE(BASE)) dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_pix(in_pix), .in_x(in_x), .in_y(in_y),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_addr(wr_addr), .wr_data(wr_data),
    .rows_done(rows_done), .overflow(overflow));
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (wr_valid && !wr_ready) nstall++;
    if (wr_valid && wr_ready) begin
      int a;
      checks++;
      if (exp_a.size() == 0 || int'(wr_addr) != exp_a[0] || wr_data !== exp_d[0]) failures++;
      a = exp_a.pop_front(); void'(exp_d.pop_front());
      nwr++;
      // rows_done after this write: rows completely written in this frame
      #1;
      checks++;
      if (int'(rows_done) != ((a - BASE) + 1) / W) begin failures++; $display("rows_done %0d after %0d", rows_done, a); end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nwr = 0; nstall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); wr_ready = ($urandom_range(0, 3) != 0); end
    join_none
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 1) == 0) begin @(negedge clk); in_valid = 0; end
          @(negedge clk);
          in_valid = 1; in_pix = 8'($urandom); in_x = coord_t'(x); in_y = coord_t'(y);
          exp_a.push_back(BASE + y * W + x); exp_d.push_back(in_pix);
        end
    @(negedge clk); in_valid = 0;
    repeat (50) @(posedge clk);
    checks++; if (nwr != 2 * W * H) begin failures++; $display("writes %0d", nwr); end
    checks++; if (overflow) begin failures++; $display("overflow"); end
    checks++; if (nstall == 0) begin failures++; $display("no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
