// Testbench for keypoint_buffer: four scales push keypoints in raster order
// (several per row), the reader accepts with a random ready. Per scale the
// order must be kept, nothing may be lost below the depth, overflow must be
// flagged above it, and while a row's keypoints are waiting the reader must
// stay on that row (counted as row hits).
module tb_keypoint_buffer;
  import orb_pkg::*;
  localparam int D = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid = '0;
  kp_t in_kp [4];
  logic out_valid, out_ready = 0;
  kps_t out_kp;
  logic [3:0] overflow;
  kp_t q [4][$];
  int nrow_hits = 0, nswitch = 0, nout = 0;
  kps_t last;
  bit have_last;

  keypoint_buffer #(.DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_kp(in_kp),
    .out_valid(out_valid), .out_ready(out_ready), .out_kp(out_kp), .overflow(overflow));
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int s;
      s = out_kp.scale;
      checks++;
      if (q[s].size() == 0 || out_kp.x !== q[s][0].x || out_kp.y !== q[s][0].y) failures++;
      else void'(q[s].pop_front());
      if (have_last && last.scale == out_kp.scale && last.y == out_kp.y) nrow_hits++;
      else nswitch++;
      last = out_kp; have_last = 1; nout++;
    end
    for (int s = 0; s < 4; s++) if (in_valid[s]) q[s].push_back(in_kp[s]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nrow_hits = 0; nswitch = 0; nout = 0; have_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      for (int s = 0; s < 4; s++) begin
        in_valid[s] = ($urandom_range(0, 9) == 0);
        in_kp[s] = '{x: coord_t'(n % 97), y: coord_t'(n / 50)};
      end
    end
    @(negedge clk); in_valid = '0; out_ready = 1;
    repeat (100) @(posedge clk);
    for (int s = 0; s < 4; s++) begin checks++; if (q[s].size() != 0) failures++; end
    checks++; if (overflow != 0) begin failures++; $display("unexpected overflow"); end
    checks++; if (nrow_hits == 0 || nswitch == 0) begin failures++; $display("row hits %0d switches %0d", nrow_hits, nswitch); end
    // overflow: fill scale 2 beyond its depth with the reader stopped
    @(negedge clk); out_ready = 0;
    for (int i = 0; i < D + 3; i++) begin
      @(negedge clk); in_valid = 4'b0100; in_kp[2] = '{x: coord_t'(i), y: '0};
    end
    @(negedge clk); in_valid = '0;
    @(posedge clk); #1;
    checks++; if (overflow != 4'b0100) begin failures++; $display("overflow %b", overflow); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
