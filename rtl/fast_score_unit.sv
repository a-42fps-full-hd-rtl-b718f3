// fast_score_unit: FAST score as the sum of absolute differences on the arc.
//
// diff_array holds |circle[i] - center| for the sixteen circle pixels. Each
// difference is ANDed with its mask bit (no multiplier), and an adder tree of
// four levels sums the filtered differences. The score is at most
// 16 x 255 = 4080 and fits SCORE_W (12) bits. Purely combinational.
module fast_score_unit
  import orb_pkg::*;
(
  input  pix_t        center,
  input  pix_t        circle [16],
  input  logic [15:0] mask,
  output score_t      score
);
  pix_t        fdiff [16];
  logic [8:0]  l1 [8];
  logic [9:0]  l2 [4];
  logic [10:0] l3 [2];

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      pix_t d;
      d = (circle[i] > center) ? circle[i] - center : center - circle[i];
      fdiff[i] = d & {PIX_W{mask[i]}};
    end
    for (int i = 0; i < 8; i++) l1[i] = {1'b0, fdiff[2*i]} + {1'b0, fdiff[2*i+1]};
    for (int i = 0; i < 4; i++) l2[i] = {1'b0, l1[2*i]} + {1'b0, l1[2*i+1]};
    for (int i = 0; i < 2; i++) l3[i] = {1'b0, l2[2*i]} + {1'b0, l2[2*i+1]};
    score = {1'b0, l3[0]} + {1'b0, l3[1]};
  end
endmodule
