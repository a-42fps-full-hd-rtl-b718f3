// fast_test_unit: one string-based FAST-9 test unit (dark or bright).
//
// Sixteen comparators test the Bresenham-circle pixels against the centre
// plus (bright) or minus (dark) the threshold t; their outputs form string0.
// Bit i of string1 is the AND of the nine circularly consecutive string0 bits
// centred on i (i-4 .. i+4), so string1 is non-zero exactly when nine
// contiguous circle pixels pass: that is the flag. The mask is the OR of
// string1 and its circular shifts by 1 to 4 places in both directions, so it
// marks every circle pixel lying on a passing arc of nine. The unit is purely
// combinational, without search or early rejection, as in the described test
// unit; centring the nine-bit window on bit i is this design's reading of how
// the nine shifted strings line up with the arc.
module fast_test_unit
  import orb_pkg::*;
#(
  parameter bit BRIGHT = 1'b0   // 0: dark test, 1: bright test
) (
  input  pix_t        center,
  input  pix_t        circle [16],
  input  pix_t        t,
  output logic        flag,
  output logic [15:0] mask
);
  logic [15:0] s0, s1;

  function automatic logic [15:0] rotl(logic [15:0] v, int n);
    return (v << n) | (v >> (16 - n));
  endfunction
  function automatic logic [15:0] rotr(logic [15:0] v, int n);
    return (v >> n) | (v << (16 - n));
  endfunction

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      if (BRIGHT) s0[i] = {1'b0, circle[i]} > ({1'b0, center} + {1'b0, t});
      else        s0[i] = ({1'b0, circle[i]} + {1'b0, t}) < {1'b0, center};
    end
    for (int i = 0; i < 16; i++) begin
      s1[i] = 1'b1;
      for (int j = -4; j <= 4; j++) s1[i] = s1[i] & s0[(i + j + 16) % 16];
    end
    flag = |s1;
    mask = s1;
    for (int n = 1; n <= 4; n++) mask = mask | rotl(s1, n) | rotr(s1, n);
  end
endmodule
