// Testbench for downsampler: every pair of phases with random pixels. The
// reference applies the weights (4-k, k)/4 of output k of a group, first
// along the row and then between the rows, with truncation after each pass.
module tb_downsampler;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  pix_t cur, left, up, up_left, dout;
  logic [2:0] px, py;
  logic valid;
  downsampler dut (.cur(cur), .left(left), .up(up), .up_left(up_left),
                   .px(px), .py(py), .valid(valid), .dout(dout));

  function automatic int f(int prev, int c, int ph);
    int k;
    if (ph == 0 || ph == 1) return c;
    k = ph - 1;
    return ((4 - k) * prev + k * c) / 4;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++)
      for (int a = 0; a < 5; a++)
        for (int b = 0; b < 5; b++) begin
          int e;
          px = 3'(a); py = 3'(b);
          cur = 8'($urandom); left = 8'($urandom); up = 8'($urandom); up_left = 8'($urandom);
          #1;
          checks++;
          if (valid !== (a != 1 && b != 1)) failures++;
          if (a != 1 && b != 1) begin
            e = f(f(up_left, up, a), f(left, cur, a), b);
            checks++;
            if (int'(dout) != e) begin failures++; if (failures < 5) $display("ph %0d %0d: %0d expected %0d", a, b, dout, e); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
