// Testbench for fast_score_unit: random circles and masks against a plain
// sum of masked absolute differences.
module tb_fast_score_unit;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  pix_t center;
  pix_t circle [16];
  logic [15:0] mask;
  score_t score;

  fast_score_unit dut (.center(center), .circle(circle), .mask(mask), .score(score));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e;
      e = 0;
      center = 8'($urandom);
      mask = (n == 0) ? 16'hFFFF : 16'($urandom);
      for (int i = 0; i < 16; i++) circle[i] = (n == 0) ? 8'(center ^ 8'hFF) : 8'($urandom);
      #1;
      for (int i = 0; i < 16; i++)
        if (mask[i]) e += (int'(circle[i]) > int'(center)) ? int'(circle[i]) - int'(center) : int'(center) - int'(circle[i]);
      checks++;
      if (int'(score) != e) begin failures++; if (failures < 5) $display("score %0d expected %0d", score, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
