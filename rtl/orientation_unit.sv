// orientation_unit: keypoint orientation by the intensity-centroid method,
// computed while the patch is being loaded.
//
// The patch arrives as a raster of 43 x 43 pixels (in_valid, in_first on its
// first pixel), keypoint in the middle. The coordinate unit counts the
// pixel's offset (dx, dy) from the keypoint; two multiply-accumulate units
// add dx*I and dy*I over the disc dx^2 + dy^2 <= 15^2, giving the moments mx
// and my. After the last pixel a 20-step shift-and-subtract divider (the
// tangent step) computes min(|mx|,|my|) / max(|mx|,|my|) as a 20-bit fraction;
// comparing it with the tangents of 5.625, 16.875, 28.125 and 39.375 degrees
// (a four-entry table) gives the angle within the octant, and the signs and
// the larger component give the quadrant. The result is one of 32 orientations,
// id = round(atan2(my, mx) / 11.25 deg) mod 32, with y pointing down the image.
// out_valid pulses once, 22 cycles after the last pixel; mx = my = 0 gives 0.
// The moment definition, the 20-cycle tangent step, the table look-up and the
// 32 orientations follow the described unit; the divider form is this
// design's own.
module orientation_unit
  import orb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  pix_t       in_pix,
  output logic       out_valid,
  output logic [4:0] out_id,
  output logic signed [23:0] mx,
  output logic signed [23:0] my
);
  localparam int QB = 20;   // fraction bits of the tangent
  localparam logic [QB-1:0] TAN_B [4] = '{20'd103276, 20'd318082, 20'd560476, 20'd860544};

  typedef enum logic [1:0] {ACC, DIV, FIN} state_t;
  state_t state;

  logic signed [6:0] dx, dy, cdx, cdy;
  logic [10:0]       npix;
  logic              in_disc;
  logic [22:0]       num, den, rem;
  logic [QB-1:0]     q;
  logic [4:0]        step;

  // coordinate unit
  assign cdx = in_first ? -7'sd21 : dx;
  assign cdy = in_first ? -7'sd21 : dy;
  assign in_disc = (32'(cdx * cdx) + 32'(cdy * cdy)) <= 32'(CENT_R * CENT_R);

  function automatic logic [22:0] absv(logic signed [23:0] v);
    return v[23] ? 23'(-v) : 23'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ACC;
      dx <= '0; dy <= '0; npix <= '0;
      mx <= '0; my <= '0;
      num <= '0; den <= '0; rem <= '0; q <= '0; step <= '0;
      out_valid <= 1'b0;
      out_id    <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        ACC: if (in_valid) begin
          logic signed [23:0] wx, wy;
          wx = in_disc ? 24'(cdx * $signed({1'b0, in_pix})) : '0;
          wy = in_disc ? 24'(cdy * $signed({1'b0, in_pix})) : '0;
          if (in_first) begin
            mx <= wx; my <= wy; npix <= 11'd1;
          end else begin
            mx <= mx + wx; my <= my + wy; npix <= npix + 1'b1;
          end
          if (cdx == 7'sd21) begin dx <= -7'sd21; dy <= cdy + 1'b1; end
          else begin dx <= cdx + 1'b1; dy <= cdy; end
          if ((in_first ? 11'd1 : npix + 1'b1) == 11'(PATCH_N * PATCH_N)) begin
            state <= DIV;
            step  <= '0;
          end
        end
        DIV: begin
          if (step == '0) begin
            // operands: smaller over larger magnitude
            if (absv(my) <= absv(mx)) begin num <= absv(my); den <= absv(mx); end
            else begin num <= absv(mx); den <= absv(my); end
            rem  <= '0;
            q    <= '0;
            step <= 5'd1;
          end else begin
            logic [23:0] r2;
            r2 = (step == 5'd1) ? {num, 1'b0} : {rem, 1'b0};
            if (r2 >= {1'b0, den}) begin
              rem <= 23'(r2 - {1'b0, den});
              q   <= {q[QB-2:0], 1'b1};
            end else begin
              rem <= r2[22:0];
              q   <= {q[QB-2:0], 1'b0};
            end
            if (step == 5'(QB)) state <= FIN;
            step <= step + 1'b1;
          end
        end
        FIN: begin
          logic [2:0] k;
          logic [3:0] b;   // angle in the quadrant, 0..8
          k = 3'd0;
          for (int i = 0; i < 4; i++) if (q >= TAN_B[i]) k = 3'(i + 1);
          b = (absv(my) <= absv(mx)) ? {1'b0, k} : 4'd8 - {1'b0, k};
          if (mx == '0 && my == '0) out_id <= '0;
          else if (!mx[23] && !my[23]) out_id <= 5'(b);
          else if (mx[23] && !my[23])  out_id <= 5'(5'd16 - 5'(b));
          else if (mx[23] && my[23])   out_id <= 5'(5'd16 + 5'(b));
          else                         out_id <= 5'(6'd32 - 6'(b));
          out_valid <= 1'b1;
          state     <= ACC;
        end
        default: state <= ACC;
      endcase
    end
  end
endmodule
