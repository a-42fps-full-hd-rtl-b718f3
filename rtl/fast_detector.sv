// fast_detector: FAST-9 keypoint detection with score on the centre of the
// 7x7 window.
//
// The sixteen pixels of the radius-3 Bresenham circle are taken from the
// window, numbered clockwise from the top (offsets (0,-3), (1,-3), (2,-2),
// (3,-1), (3,0) ...). Two identical test units run the dark and the bright
// test; the corner flag and the mask are the OR of their results, and the
// score unit sums the masked absolute differences. Window rows count upwards
// (win[r] is r rows above win[0]) and columns count leftwards, so the circle
// pixel at offset (dx, dy) is win[3-dy][3-dx]. Purely combinational; the
// caller registers the result.
module fast_detector
  import orb_pkg::*;
(
  input  pix_t   win [7][7],
  input  pix_t   t,
  output logic   corner,
  output score_t score
);
  localparam int DX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  localparam int DY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};

  pix_t        center;
  pix_t        circle [16];
  logic        dark_flag, bright_flag;
  logic [15:0] dark_mask, bright_mask;

  assign center = win[3][3];
  for (genvar i = 0; i < 16; i++) begin : g_circ
    assign circle[i] = win[3 - DY[i]][3 - DX[i]];
  end

  fast_test_unit #(.BRIGHT(1'b0)) u_dark (
    .center(center), .circle(circle), .t(t), .flag(dark_flag), .mask(dark_mask)
  );
  fast_test_unit #(.BRIGHT(1'b1)) u_bright (
    .center(center), .circle(circle), .t(t), .flag(bright_flag), .mask(bright_mask)
  );
  fast_score_unit u_score (
    .center(center), .circle(circle), .mask(dark_mask | bright_mask), .score(score)
  );
  assign corner = dark_flag | bright_flag;
endmodule
