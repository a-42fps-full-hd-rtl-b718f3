// Testbench for patch_buffer: a patch written in raster order, then random
// reads at (column, row) against the model (one cycle latency).
module tb_patch_buffer;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [5:0] w_col, w_row, r_col, r_row;
  pix_t w_data, r_data;
  pix_t model [43][43];
  patch_buffer dut (.clk(clk), .we(we), .w_col(w_col), .w_row(w_row), .w_data(w_data),
    .r_col(r_col), .r_row(r_row), .r_data(r_data));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    r_col = 0; r_row = 0;
    for (int k = 0; k < 3; k++) begin
      for (int r = 0; r < 43; r++)
        for (int c = 0; c < 43; c++) begin
          @(negedge clk);
          we = 1; w_col = 6'(c); w_row = 6'(r); w_data = 8'($urandom); model[c][r] = w_data;
        end
      @(negedge clk); we = 0;
      for (int n = 0; n < 2000; n++) begin
        logic [5:0] c, r;
        c = 6'($urandom_range(0, 42)); r = 6'($urandom_range(0, 42));
        @(negedge clk); r_col = c; r_row = r;
        @(posedge clk); #1;
        checks++;
        if (r_data !== model[c][r]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
