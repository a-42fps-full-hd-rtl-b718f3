// Testbench for score_recorder: rows of a small frame with random keypoints
// and scores. For every segment the reference computes the counters, the
// pointer and the local threshold ts from their definitions and expects the
// segment's keypoints above ts, in order.
module tb_score_recorder;
  import orb_pkg::*;
  localparam int W = 64, ROWS = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  pix_t t = 8'd10;
  logic [7:0] tn = 8'd3;
  logic in_kp; score_t in_score; coord_t in_x, in_y;
  logic kp_valid, overrun; kp_t kp;
  kp_t exp_q [$];
  int nmid, nhigh, nptr0, ndrop;

  score_recorder #(.W(W), .LOCAL_DEPTH(64)) dut (.clk(clk), .rst_n(rst_n), .t(t), .tn(tn),
    .en(en), .in_kp(in_kp), .in_score(in_score), .in_x(in_x), .in_y(in_y),
    .kp_valid(kp_valid), .kp(kp), .overrun(overrun));
  always #5 clk = ~clk;

  function automatic int step(int j);
    return 9 * int'(t) + ((4080 - 9 * int'(t)) * j) / 8;
  endfunction

  always @(posedge clk) if (rst_n && kp_valid) begin
    checks++;
    if (exp_q.size() == 0 || kp !== exp_q[0]) begin
      failures++;
      if (failures < 5) $display("got (%0d,%0d)", kp.x, kp.y);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nmid = 0; nhigh = 0; nptr0 = 0; ndrop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < ROWS; y++)
      for (int sg = 0; sg < 8; sg++) begin
        bit f [8]; int s [8]; int n [8]; int ptr, ts, dens;
        dens = $urandom_range(0, 3);
        for (int i = 0; i < 8; i++) begin
          f[i] = ($urandom_range(0, 3) < dens);
          s[i] = $urandom_range(91, 4080);
        end
        for (int j = 0; j < 8; j++) begin
          n[j] = 0;
          for (int i = 0; i < 8; i++) if (f[i] && s[i] > step(j)) n[j]++;
        end
        ptr = 0;
        while (ptr < 7 && n[ptr] >= int'(tn)) ptr++;
        if (n[ptr] > int'(tn) / 2 || ptr == 0) ts = step(ptr);
        else ts = (step(ptr) + step(ptr - 1)) / 2;
        if (ptr == 0) nptr0++;
        else if (n[ptr] > int'(tn) / 2) nhigh++;
        else nmid++;
        for (int i = 0; i < 8; i++) begin
          if (f[i] && s[i] > ts) exp_q.push_back('{x: coord_t'(sg * 8 + i), y: coord_t'(y)});
          else if (f[i]) ndrop++;
          while ($urandom_range(0, 4) == 0) begin @(negedge clk); en = 0; end
          @(negedge clk);
          en = 1; in_kp = f[i]; in_score = score_t'(s[i]); in_x = coord_t'(sg * 8 + i); in_y = coord_t'(y);
        end
      end
    @(negedge clk); en = 0;
    repeat (20) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d keypoints missing", exp_q.size()); end
    checks++; if (overrun) begin failures++; $display("overrun"); end
    // each branch of the threshold rule must have been taken
    checks++; if (nmid == 0 || nhigh == 0 || nptr0 == 0 || ndrop == 0) begin
      failures++; $display("cases mid %0d high %0d ptr0 %0d drop %0d", nmid, nhigh, nptr0, ndrop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
