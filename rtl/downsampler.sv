// downsampler: 1.25x bilinear downsampling, five source pixels to four.
//
// Inside each group of five source pixels I0..I4 the four outputs are
// Id0 = I0, Id1 = (3*I1 + I2) >> 2, Id2 = (2*I2 + 2*I3) >> 2 and
// Id3 = (I3 + 3*I4) >> 2, all by shifts and adds. The unit sees the newest
// 2x2 corner of the window: cur and its left neighbour in the newest row, and
// the same two pixels one row above. px and py are the source column and row
// phases (position modulo 5) of cur. Output k of a group is produced when the
// source phase is k+1 (k = 1..3) or 0 (k = 0), so valid is high for phases
// 0, 2, 3 and 4 in both directions. The rows are filtered horizontally first
// and the two results are combined vertically with the same weights.
// Purely combinational.
module downsampler
  import orb_pkg::*;
(
  input  pix_t       cur,       // row r,   column c
  input  pix_t       left,      // row r,   column c-1
  input  pix_t       up,        // row r-1, column c
  input  pix_t       up_left,   // row r-1, column c-1
  input  logic [2:0] px,
  input  logic [2:0] py,
  output logic       valid,
  output pix_t       dout
);
  // One filter step: prev is the earlier pixel, cur the later one.
  function automatic pix_t interp(pix_t prev, pix_t cur_p, logic [2:0] ph);
    logic [9:0] a, b;
    a = {2'b0, prev};
    b = {2'b0, cur_p};
    case (ph)
      3'd2:    return 8'(((a << 1) + a + b) >> 2);
      3'd3:    return 8'(((a << 1) + (b << 1)) >> 2);
      3'd4:    return 8'((a + (b << 1) + b) >> 2);
      default: return cur_p;
    endcase
  endfunction

  pix_t h_cur, h_up;
  always_comb begin
    h_cur = interp(left, cur, px);
    h_up  = interp(up_left, up, px);
    dout  = interp(h_up, h_cur, py);
    valid = (px != 3'd1) && (py != 3'd1) && (px < 3'd5) && (py < 3'd5);
  end
endmodule
