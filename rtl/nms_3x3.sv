// nms_3x3: four-stage 3x3 non-maximum suppression on the raster stream of
// FAST results, with a one-row candidate buffer.
//
// Pixels arrive in raster order (en high, one per accepted pixel) with their
// corner flag, score and coordinates, and move through registers B4 -> B3 ->
// B2 -> B1 -> B0. M0 checks a pixel against its left neighbour as it moves
// from B4 to B3; M1 checks it against its right neighbour as it moves from B3
// to B2; M2 checks B1 against the three pixels above it (A0, A1, A2) and
// writes the result to the candidate buffer; M3 checks A1, read back from the
// candidate buffer one row later, against the three pixels below it (B0, B1,
// B2) and gives the final result. A corner is suppressed when a neighbouring
// corner has a strictly higher score. Every comparison uses the neighbour's
// original corner flag and score, so the result equals a full 3x3 maximum
// test (equal scores keep both); neighbours outside the frame are ignored.
//
// Output: one registered result per accepted pixel once the second row has
// started: out_valid, out_kp (keypoint), out_score and the coordinates of the
// pixel one row above B1. The last row of a frame is never reported; FAST
// cannot flag it (3-pixel border), so nothing is lost. The candidate buffer
// is a delay line of W-1 entries so that A2 sits above-right of B1.
module nms_3x3
  import orb_pkg::*;
#(
  parameter int W = 1920
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_flag,
  input  score_t in_score,
  input  coord_t in_x,
  input  coord_t in_y,
  output logic   out_valid,
  output logic   out_kp,
  output score_t out_score,
  output coord_t out_x,
  output coord_t out_y
);
  typedef struct packed {
    logic   flag;   // FAST corner (original)
    logic   keep;   // still a keypoint candidate
    score_t score;
    coord_t x;
    coord_t y;
  } ent_t;

  typedef struct packed {
    logic   flag;
    logic   keep;
    score_t score;
  } cand_t;

  ent_t  b4, b3, b2, b1, b0;
  cand_t a2, a1, a0, cand_din;

  // "p beats q": p is a corner with a strictly higher score than q.
  function automatic logic beats(logic pf, score_t ps, score_t qs);
    return pf && (ps > qs);
  endfunction

  logic m0_sup, m1_sup, m2_sup, m3_sup;
  logic b0_ok, b2_ok, a_ok, a0_ok, a2_ok;

  always_comb begin
    // M0: B4 against its left neighbour B3 (same row unless B4 starts a row).
    m0_sup = b4.flag && (b4.x != '0) && beats(b3.flag, b3.score, b4.score);
    // M1: B3 against its right neighbour B4.
    m1_sup = b3.flag && (b4.x != '0) && beats(b4.flag, b4.score, b3.score);
    // Neighbour validity around B1 (column and row borders).
    b0_ok = (b1.x != '0);
    b2_ok = (b1.x != coord_t'(W - 1));
    a_ok  = (b1.y != '0);
    a0_ok = a_ok && b0_ok;
    a2_ok = a_ok && b2_ok;
    // M2: B1 against the row above.
    m2_sup = (a0_ok && beats(a0.flag, a0.score, b1.score))
          || (a_ok  && beats(a1.flag, a1.score, b1.score))
          || (a2_ok && beats(a2.flag, a2.score, b1.score));
    cand_din = '{flag: b1.flag, keep: b1.keep && !m2_sup, score: b1.score};
    // M3: A1 against the row below.
    m3_sup = (b0_ok && beats(b0.flag, b0.score, a1.score))
          || beats(b1.flag, b1.score, a1.score)
          || (b2_ok && beats(b2.flag, b2.score, a1.score));
  end

  line_fifo #(.WIDTH($bits(cand_t)), .DEPTH(W - 1)) u_cand (
    .clk(clk), .rst_n(rst_n), .en(en), .din(cand_din), .dout(a2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b4 <= '0; b3 <= '0; b2 <= '0; b1 <= '0; b0 <= '0;
      a1 <= '0; a0 <= '0;
      out_valid <= 1'b0;
      out_kp    <= 1'b0;
      out_score <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (en) begin
        b4 <= '{flag: in_flag, keep: in_flag, score: in_score, x: in_x, y: in_y};
        b3 <= '{flag: b4.flag, keep: b4.keep && !m0_sup, score: b4.score, x: b4.x, y: b4.y};
        b2 <= '{flag: b3.flag, keep: b3.keep && !m1_sup, score: b3.score, x: b3.x, y: b3.y};
        b1 <= b2;
        b0 <= b1;
        a1 <= a2;
        a0 <= a1;
        if (a_ok) begin
          out_valid <= 1'b1;
          out_kp    <= a1.flag && a1.keep && !m3_sup;
          out_score <= a1.score;
          out_x     <= b1.x;
          out_y     <= b1.y - 1'b1;
        end
      end
    end
  end
endmodule
