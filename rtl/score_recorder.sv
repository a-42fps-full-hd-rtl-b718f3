// score_recorder: adaptive per-segment score threshold for the keypoints that
// survive NMS, with the local keypoint buffer in front of the global one.
//
// Each row is cut into eight segments. Two record tables are used in turn, one
// per segment. A table has eight score steps S0..S7, spread evenly from 9*t
// (the lowest possible FAST-9 score is above this) up to the largest score,
// 4080, and eight counters: Nj counts the segment's keypoints whose score is
// above Sj. The pointer is the first j whose Nj is still below the number
// threshold tn (7 at most), which is what moving the pointer up each time
// N[ptr] reaches tn gives. When the segment ends the local threshold is
//   ts = S[ptr]                     if N[ptr] >  tn/2
//   ts = (S[ptr] + S[ptr-1]) / 2    if N[ptr] <= tn/2   (S[-1] taken as S0)
// and is latched for that table; the table's counters are cleared when it is
// next used. Keypoints wait in the local keypoint buffer, tagged with their
// table, until their segment's threshold is known; then those scoring above
// ts are passed on, one per cycle. The structure (two tables, eight entries,
// eq. for ts) follows the described recorder; the even spacing of the steps,
// the strict comparisons and the drop-on-full policy are this design's own.
//
// Input: one NMS result per cycle at most (en) in raster order over whole rows.
// Output: kp_valid pulses with the keypoint's coordinates, no back-pressure.
// overrun is a sticky flag raised when a keypoint had to be dropped because
// the local buffer was full or its threshold was replaced before it left.
module score_recorder
  import orb_pkg::*;
#(
  parameter int W           = 1920,
  parameter int LOCAL_DEPTH = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pix_t   t,          // FAST threshold
  input  logic [7:0] tn,     // number threshold per segment
  input  logic   en,
  input  logic   in_kp,
  input  score_t in_score,
  input  coord_t in_x,
  input  coord_t in_y,
  output logic   kp_valid,
  output kp_t    kp,
  output logic   overrun
);
  localparam int MAXS = 16 * 255;
  localparam int CW = 9;    // counter width (a segment holds at most 240 keypoints)

  typedef struct packed {
    logic   tbl;
    score_t score;
    coord_t x;
    coord_t y;
  } lk_t;

  score_t        S [8];
  logic [CW-1:0] N     [2][8];
  logic [CW-1:0] N_nxt [8];
  score_t        ts    [2];
  logic   [1:0]  ts_ok;
  logic          cur;           // table recording the current segment
  logic   [2:0]  seg;
  logic          seg_end;
  logic   [2:0]  ptr;
  score_t        ts_new;

  // Score steps from the FAST threshold.
  always_comb begin
    logic [15:0] base;
    base = 16'(t) * 16'd9;
    for (int j = 0; j < 8; j++)
      S[j] = score_t'(base + (((16'(MAXS) - base) * 16'(j)) >> 3));
  end

  // Last column of segment j.
  function automatic coord_t seg_last(logic [2:0] j);
    return coord_t'(((int'(j) + 1) * W) / 8 - 1);
  endfunction

  assign seg_end = en && (in_x == seg_last(seg));

  // Counters of the current table including this cycle's keypoint.
  always_comb begin
    for (int j = 0; j < 8; j++)
      N_nxt[j] = N[cur][j] + CW'(en && in_kp && in_score > S[j] && N[cur][j] != '1);
    ptr = 3'd7;
    for (int j = 7; j >= 0; j--)
      if (N_nxt[j] < CW'(tn)) ptr = 3'(j);
    if (N_nxt[ptr] > CW'(tn >> 1) || ptr == 3'd0) ts_new = S[ptr];
    else ts_new = score_t'(({1'b0, S[ptr]} + {1'b0, S[ptr - 3'd1]}) >> 1);
  end

  // Local keypoint buffer.
  logic lb_wr_ready, lb_rd_valid, lb_rd_ready;
  lk_t  lb_head;
  logic [$clog2(LOCAL_DEPTH+1)-1:0] lb_count;
  logic lb_push;
  lk_t  lb_in;
  assign lb_push = en && in_kp;
  assign lb_in   = '{tbl: cur, score: in_score, x: in_x, y: in_y};

  sync_fifo #(.WIDTH($bits(lk_t)), .DEPTH(LOCAL_DEPTH)) u_local (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(lb_push), .wr_ready(lb_wr_ready),
    .wr_data(lb_in),
    .rd_valid(lb_rd_valid), .rd_ready(lb_rd_ready), .rd_data(lb_head),
    .count(lb_count)
  );
  assign lb_rd_ready = lb_rd_valid && ts_ok[lb_head.tbl];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2; k++) begin
        for (int j = 0; j < 8; j++) N[k][j] <= '0;
        ts[k] <= '0;
      end
      ts_ok    <= 2'b00;
      cur      <= 1'b0;
      seg      <= '0;
      kp_valid <= 1'b0;
      kp       <= '0;
      overrun  <= 1'b0;
    end else begin
      if (en) begin
        if (seg_end) begin
          ts[cur]     <= ts_new;
          ts_ok[cur]  <= 1'b1;
          ts_ok[!cur] <= 1'b0;
          for (int j = 0; j < 8; j++) N[!cur][j] <= '0;
          cur <= !cur;
          seg <= (in_x == coord_t'(W - 1)) ? 3'd0 : seg + 3'd1;
          // Entries of the table being reused must have left by now.
          if (lb_rd_valid && lb_head.tbl == !cur && !lb_rd_ready) overrun <= 1'b1;
        end else begin
          for (int j = 0; j < 8; j++) N[cur][j] <= N_nxt[j];
        end
      end
      if (lb_push && !lb_wr_ready) overrun <= 1'b1;
      kp_valid <= lb_rd_ready && (lb_head.score > ts[lb_head.tbl]);
      kp       <= '{x: lb_head.x, y: lb_head.y};
    end
  end
endmodule
