// Testbench for fast_detector: random and corner-shaped 7x7 windows; the
// window is viewed as a 7x7 image (row 6 - r, column 6 - c, since the window
// counts rows up and columns left) and checked against the reference FAST-9.
module tb_fast_detector;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  int checks = 0, failures = 0;
  pix_t win [7][7];
  pix_t t;
  logic corner;
  score_t score;
  fast_detector dut (.win(win), .t(t), .corner(corner), .score(score));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    img_t im;
    int ncorner;
    ncorner = 0;
    im = new[49];
    for (int n = 0; n < 4000; n++) begin
      bit ec; int es;
      t = 8'($urandom_range(5, 40));
      for (int y = 0; y < 7; y++)
        for (int x = 0; x < 7; x++) begin
          if (n % 2 == 0) im[y * 7 + x] = 8'($urandom);
          else im[y * 7 + x] = (x + y < 6 + int'($urandom_range(0, 2))) ? 8'(60 + $urandom_range(0, 10)) : 8'(190 + $urandom_range(0, 10));
          if (x == 3 && y == 3 && n % 4 == 1) im[y * 7 + x] = 8'(120);
        end
      for (int r = 0; r < 7; r++)
        for (int c = 0; c < 7; c++) win[r][c] = im[(6 - r) * 7 + (6 - c)];
      #1;
      fast(im, 7, 3, 3, t, ec, es);
      if (ec) ncorner++;
      checks++;
      if (corner !== ec || (ec && int'(score) != es)) begin
        failures++;
        if (failures < 5) $display("corner %b score %0d expected %b %0d", corner, score, ec, es);
      end
    end
    checks++; if (ncorner < 200) begin failures++; $display("only %0d corners", ncorner); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
