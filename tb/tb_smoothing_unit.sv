// Testbench for smoothing_unit: random windows against a direct 5x5
// convolution with the binomial kernel [1 4 6 4 1]^T [1 4 6 4 1] / 256.
module tb_smoothing_unit;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  pix_t win [7][7];
  pix_t smooth;
  smoothing_unit dut (.win(win), .smooth(smooth));
  localparam int K [5] = '{1, 4, 6, 4, 1};

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int acc;
      acc = 0;
      for (int r = 0; r < 7; r++)
        for (int c = 0; c < 7; c++) win[r][c] = (n == 0) ? 8'hFF : 8'($urandom);
      #1;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) acc += K[r] * K[c] * int'(win[r+1][c+1]);
      checks++;
      if (int'(smooth) != acc / 256) begin failures++; if (failures < 5) $display("smooth %0d expected %0d", smooth, acc / 256); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
