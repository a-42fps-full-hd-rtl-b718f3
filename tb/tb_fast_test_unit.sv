// Testbench for fast_test_unit: random and constructed circles; the reference
// searches every start position for a run of nine passing pixels and marks
// the covered pixels, for the dark and the bright unit.
module tb_fast_test_unit;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  pix_t center, t;
  pix_t circle [16];
  logic fd, fb;
  logic [15:0] md, mb;

  fast_test_unit #(.BRIGHT(1'b0)) u_d (.center(center), .circle(circle), .t(t), .flag(fd), .mask(md));
  fast_test_unit #(.BRIGHT(1'b1)) u_b (.center(center), .circle(circle), .t(t), .flag(fb), .mask(mb));

  task automatic ref_test(input bit bright, output logic f, output logic [15:0] m);
    logic [15:0] pass;
    for (int i = 0; i < 16; i++)
      pass[i] = bright ? (int'(circle[i]) > int'(center) + int'(t))
                       : (int'(circle[i]) < int'(center) - int'(t));
    f = 0; m = 0;
    for (int s = 0; s < 16; s++) begin
      bit run = 1;
      for (int j = 0; j < 9; j++) run &= pass[(s + j) % 16];
      if (run) begin
        f = 1;
        for (int j = 0; j < 9; j++) m[(s + j) % 16] = 1'b1;
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic ef; logic [15:0] em;
    int nf = 0;
    for (int n = 0; n < 4000; n++) begin
      center = 8'($urandom_range(30, 220));
      t = 8'($urandom_range(5, 40));
      if (n % 2 == 0) begin
        // constructed arc of random length at a random place
        int st = $urandom_range(0, 15), len = $urandom_range(7, 12);
        bit br = $urandom_range(0, 1);
        for (int i = 0; i < 16; i++) circle[i] = center;
        for (int j = 0; j < len; j++)
          circle[(st + j) % 16] = br ? 8'(int'(center) + int'(t) + 1 + $urandom_range(0, 20) > 255 ? 255 : int'(center) + int'(t) + 1 + $urandom_range(0, 20))
                                     : 8'(int'(center) - int'(t) - 1 - $urandom_range(0, 20) < 0 ? 0 : int'(center) - int'(t) - 1 - $urandom_range(0, 20));
      end else begin
        for (int i = 0; i < 16; i++) circle[i] = 8'($urandom);
      end
      #1;
      ref_test(0, ef, em);
      checks++; if (fd !== ef || md !== em) begin failures++; if (failures < 5) $display("dark mismatch %b %b / %b %b", fd, md, ef, em); end
      ref_test(1, ef, em);
      checks++; if (fb !== ef || mb !== em) begin failures++; if (failures < 5) $display("bright mismatch %b %b / %b %b", fb, mb, ef, em); end
      if (fd || fb) nf++;
    end
    checks++; if (nf < 100) begin failures++; $display("too few corners %0d", nf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
