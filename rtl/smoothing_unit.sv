// smoothing_unit: 5x5 binomial smoothing of the window centre by shifts and
// adds.
//
// The kernel is the outer product of [1 4 6 4 1] with itself (sum 256). Pixels
// sharing a weight are summed first and the six group sums are scaled by
// shifts: weight 1 (corners), 4 = <<2, 6 = <<2 + <<1, 16 = <<4,
// 24 = <<4 + <<3 and 36 = <<5 + <<2; the total is shifted right by 8
// (truncation). The 5x5 area is the inner part of the 7x7 window, centred on
// win[3][3]. Purely combinational.
module smoothing_unit
  import orb_pkg::*;
(
  input  pix_t win [7][7],
  output pix_t smooth
);
  // p(i): pixel number i of the 5x5 area, numbered row by row from 0 to 24.
  function automatic logic [15:0] p(input pix_t w [7][7], input int i);
    return {8'd0, w[1 + i / 5][1 + i % 5]};
  endfunction

  logic [15:0] s0, s1, s2, s3, s4, s5, t0, t1, t2, t3, t4, t5, total;

  always_comb begin
    s0 = p(win, 0) + p(win, 4) + p(win, 20) + p(win, 24);
    s1 = p(win, 1) + p(win, 3) + p(win, 5) + p(win, 9) + p(win, 15) + p(win, 19)
       + p(win, 21) + p(win, 23);
    s2 = p(win, 2) + p(win, 10) + p(win, 14) + p(win, 22);
    s3 = p(win, 6) + p(win, 8) + p(win, 16) + p(win, 18);
    s4 = p(win, 7) + p(win, 11) + p(win, 13) + p(win, 17);
    s5 = p(win, 12);
    t0 = s0;
    t1 = s1 << 2;
    t2 = (s2 << 2) + (s2 << 1);
    t3 = s3 << 4;
    t4 = (s4 << 4) + (s4 << 3);
    t5 = (s5 << 5) + (s5 << 2);
    total  = t0 + t1 + t2 + t3 + t4 + t5;
    smooth = total[15:8];
  end
endmodule
