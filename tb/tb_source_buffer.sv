// Testbench for source_buffer: a raster stream with random gaps through a
// buffer with short rows; rows[k] must equal the pixel k+1 rows above the
// one presented at the input.
module tb_source_buffer;
  import orb_pkg::*;
  localparam int L = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  pix_t in_pix;
  pix_t rows [7];
  pix_t seq [$];
  source_buffer #(.ROW_LEN(L)) dut (.clk(clk), .rst_n(rst_n), .en(en), .in_pix(in_pix), .rows(rows));
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      in_pix = 8'($urandom);
      #1;
      if (en) begin
        int i;
        i = seq.size();   // index of the presented pixel
        for (int k = 0; k < 7; k++)
          if (i >= (k + 1) * L) begin
            checks++;
            if (rows[k] !== seq[i - (k + 1) * L]) failures++;
          end
        seq.push_back(in_pix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
