// Testbench for window_regfile: random columns shifted in with random gaps;
// the window must hold the last seven accepted columns, newest at 0.
module tb_window_regfile;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  pix_t col_in [7];
  pix_t win [7][7];
  pix_t hist [$][7];
  window_regfile dut (.clk(clk), .rst_n(rst_n), .en(en), .col_in(col_in), .win(win));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      pix_t c [7];
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < 7; r++) begin c[r] = 8'($urandom); col_in[r] = c[r]; end
      if (en) hist.push_front(c);
      @(posedge clk); #1;
      if (hist.size() >= 7) begin
        for (int r = 0; r < 7; r++)
          for (int k = 0; k < 7; k++) begin
            checks++;
            if (win[r][k] !== hist[k][r]) failures++;
          end
        void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
