// Testbench for orientation_unit: patches with a brightness ramp in a random
// direction plus noise, streamed in raster order with gaps. Moments are
// compared exactly and the orientation id with real-valued atan2 (patches
// within 0.05 degrees of a bin boundary are not judged). The result must come
// 22 cycles after the last pixel.
module tb_orientation_unit;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  pix_t in_pix;
  logic out_valid;
  logic [4:0] out_id;
  logic signed [23:0] mx, my;
  int nbins [32] = '{default: 0};

  orientation_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_pix(in_pix), .out_valid(out_valid), .out_id(out_id), .mx(mx), .my(my));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    img_t p;
    int covered;
    p = new[43 * 43];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      real th, gx, gy, ang;
      longint emx, emy;
      int eid, lat;
      th = real'($urandom_range(0, 35999)) / 100.0 * 3.14159265358979 / 180.0;
      gx = $cos(th) * 2.5; gy = $sin(th) * 2.5;
      for (int y = 0; y < 43; y++)
        for (int x = 0; x < 43; x++) begin
          real v;
          v = 128.0 + gx * (x - 21) + gy * (y - 21) + real'($urandom_range(0, 20)) - 10.0;
          if (n == 0) v = 77.0;   // flat patch: zero moments
          p[y * 43 + x] = (v < 0) ? 0 : (v > 255) ? 255 : 8'(int'(v));
        end
      eid = orient(p, emx, emy, ang);
      for (int i = 0; i < 43 * 43; i++) begin
        while ($urandom_range(0, 5) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_pix = p[i];
      end
      @(negedge clk); in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 22) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (longint'(mx) != emx || longint'(my) != emy) begin failures++; $display("moments %0d %0d expected %0d %0d", mx, my, emx, emy); end
      if (bin_margin(ang) > 0.05) begin
        checks++;
        if (int'(out_id) != eid) begin failures++; $display("angle %f id %0d expected %0d", ang, out_id, eid); end
      end
      nbins[out_id]++;
      @(posedge clk);
    end
    covered = 0;
    for (int i = 0; i < 32; i++) if (nbins[i] > 0) covered++;
    checks++; if (covered < 24) begin failures++; $display("only %0d orientations seen", covered); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
