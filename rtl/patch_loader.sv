// patch_loader: loads the 43 x 43 patch around a keypoint, reusing the
// columns it shares with the previous keypoint.
//
// Only scales 1 and 3 (index 0 and 2) are kept, smoothed, in external
// memory. For each keypoint (scale s, x, y):
//  1. Boundary. The patch spans columns x-21..x+21 and rows y-21..y+21 of
//     scale s. Keypoints whose patch leaves the frame are dropped (counted in
//     n_border). If the previous keypoint had the same scale and row and lies
//     less than 43 columns to the left, its columns x_prev-21..x-22 are
//     still in the reuse buffer and only the d = x - x_prev new columns on
//     the right are fetched; otherwise all 43 columns are.
//  2. Scale mapping. For s = 1 or 3 the new region is mapped onto the stored
//     scale below: target column X needs source columns 5(X/4) + X%4 and, if
//     X%4 != 0, the one after it; rows likewise.
//  3. Fetch. The loader waits until the writer has stored every source row it
//     needs (rows_done), then reads the region row by row, one byte per beat
//     (valid/ready request, in-order response). For s = 1 or 3 the bytes pass
//     through the same 5-to-4 bilinear filter as the detector's downsampler,
//     horizontally on the fly and vertically against one stored row. Pixels
//     go to the reuse buffer at slot (X mod 43, Y - y + 21).
//  4. Stream. Alongside the fetch, the patch is read back from the reuse
//     buffer in raster order, written to the patch buffer and sent to the
//     orientation unit, one pixel per cycle. A patch row is streamed once the
//     fetch has written all its new columns, so streaming trails the fetch
//     by at most one row and a patch takes about max(fetch, 1849) cycles.
// A new frame (new_frame) invalidates the columns kept for reuse.
// It then waits for the descriptor to finish (desc_done) before taking the
// next keypoint, since both buffers are read during descriptor generation.
// Statistics: n_fetch counts bytes read from external memory, n_reuse
// keypoints that reused columns. Steps and buffers follow the described
// loader; passing every pixel through the reuse buffer (the stream reads
// fetched and reused columns alike from it, one row behind the fetch), the
// rows_done wait and the border policy are this design's choices.
module patch_loader
  import orb_pkg::*;
#(
  parameter int W     = 1920,
  parameter int H     = 1080,
  parameter int BASE0 = 0,
  parameter int BASE2 = 1920 * 1080
) (
  input  logic              clk,
  input  logic              rst_n,
  // keypoints
  input  logic              kp_valid,
  output logic              kp_ready,
  input  kps_t              kp,
  input  logic              room,        // descriptor buffer can take one more
  input  logic              desc_done,
  input  logic              new_frame,   // first pixel of a new frame entered
  // storage progress of scales 0 and 2
  input  coord_t            rows_done0,
  input  coord_t            rows_done2,
  // external memory read channel
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rsp_valid,
  input  pix_t              rsp_data,
  // reuse buffer
  output logic              rw_en,
  output logic [5:0]        rw_slot,
  output logic [5:0]        rw_row,
  output pix_t              rw_data,
  output logic [5:0]        ra_slot,
  output logic [5:0]        ra_row,
  input  pix_t              ra_data,
  // patch buffer
  output logic              pw_en,
  output logic [5:0]        pw_col,
  output logic [5:0]        pw_row,
  output pix_t              pw_data,
  // orientation stream
  output logic              o_valid,
  output logic              o_first,
  output pix_t              o_pix,
  // keypoint whose patch is ready (with the slot of its first column)
  output kps_t              cur_kp,
  output logic [5:0]        cur_kslot,
  output logic [31:0]       n_fetch,
  output logic [31:0]       n_reuse,
  output logic [31:0]       n_border,
  output logic              busy
);
  localparam int R  = PATCH_R;
  localparam int PN = PATCH_N;
  localparam int WS [4] = '{scale_len(W, 0), scale_len(W, 1), scale_len(W, 2), scale_len(W, 3)};
  localparam int HS [4] = '{scale_len(H, 0), scale_len(H, 1), scale_len(H, 2), scale_len(H, 3)};

  typedef enum logic [2:0] {IDLE, CHECK, WAIT, FETCH, HOLD} state_t;
  state_t state;

  // source coordinate of target coordinate v on the scale below
  function automatic coord_t src(coord_t v);
    return coord_t'(5 * int'(v[$bits(coord_t)-1:2]) + int'(v[1:0]));
  endfunction

  kps_t   k;
  logic   prev_v;
  kps_t   prev;
  logic   odd;
  logic [1:0] c0p, r0p;        // 5-to-4 phase of the first new column and row
  coord_t qc0, qc1, qr0, qr1;  // region read from memory
  coord_t need_rows;
  logic [5:0] slot0;

  // request side
  coord_t qr, qc;
  logic   req_done;
  // response side
  coord_t pr, pc;
  logic [2:0] phc, phr;
  logic [5:0] slot, trow;
  logic [5:0] ti;
  pix_t prev_pix;
  pix_t hline [PN];
  logic first_c, first_r;
  // stream side
  logic [5:0] si, sj, sslot;
  logic       s_v, s_first;
  logic [5:0] s_i_q, s_j_q;
  logic       fetch_on, stream_on;
  logic       s_step;

  // A patch row may be streamed once the fetch has written all of it (or the
  // fetch is over, the rest coming from reuse).
  assign s_step = stream_on && (si < trow || !fetch_on);

  function automatic pix_t interp(pix_t a, pix_t b, logic [2:0] ph);
    logic [9:0] x, y;
    x = {2'b0, a};
    y = {2'b0, b};
    case (ph)
      3'd2:    return 8'(((x << 1) + x + y) >> 2);
      3'd3:    return 8'(((x << 1) + (y << 1)) >> 2);
      3'd4:    return 8'((x + (y << 1) + y) >> 2);
      default: return b;
    endcase
  endfunction

  assign kp_ready = (state == IDLE) && room;
  assign busy     = (state != IDLE);
  assign rd_valid = (state == FETCH) && !req_done;
  assign rd_addr  = (k.scale[1] ? ADDR_W'(BASE2) : ADDR_W'(BASE0))
                  + ADDR_W'(qr) * ADDR_W'(k.scale[1] ? WS[2] : WS[0]) + ADDR_W'(qc);
  assign ra_slot  = sslot;
  assign ra_row   = si;

  // response processing (combinational part)
  logic h_out, v_out;
  pix_t h_val, v_val;
  always_comb begin
    h_out = !odd || (!(first_c && phc != 3'd0) && phc != 3'd1);
    h_val = odd ? interp(prev_pix, rsp_data, phc) : rsp_data;
    v_out = !odd || (!(first_r && phr != 3'd0) && phr != 3'd1);
    v_val = odd ? interp(hline[ti], h_val, phr) : h_val;
    rw_en   = (state == FETCH) && rsp_valid && h_out && v_out;
    rw_slot = slot;
    rw_row  = trow;
    rw_data = v_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      k <= '0; prev <= '0; prev_v <= 1'b0; odd <= 1'b0;
      c0p <= '0; r0p <= '0;
      qc0 <= '0; qc1 <= '0; qr0 <= '0; qr1 <= '0; need_rows <= '0; slot0 <= '0;
      qr <= '0; qc <= '0; req_done <= 1'b0;
      pr <= '0; pc <= '0; phc <= '0; phr <= '0; slot <= '0; trow <= '0; ti <= '0;
      prev_pix <= '0; first_c <= 1'b0; first_r <= 1'b0;
      si <= '0; sj <= '0; sslot <= '0; s_v <= 1'b0; s_first <= 1'b0;
      s_i_q <= '0; s_j_q <= '0;
      fetch_on <= 1'b0; stream_on <= 1'b0;
      cur_kp <= '0; cur_kslot <= '0;
      n_fetch <= '0; n_reuse <= '0; n_border <= '0;
    end else begin
      s_v <= 1'b0;
      case (state)
        IDLE: if (kp_valid && room) begin
          k     <= kp;
          state <= CHECK;
        end
        CHECK: begin
          if (k.x < coord_t'(R) || int'(k.x) + R >= WS[k.scale] ||
              k.y < coord_t'(R) || int'(k.y) + R >= HS[k.scale]) begin
            n_border <= n_border + 1'b1;
            state    <= IDLE;
          end else begin
            logic   reuse;
            coord_t a0, a1, b0, b1;
            reuse = prev_v && prev.scale == k.scale && prev.y == k.y &&
                    k.x > prev.x && (k.x - prev.x) < coord_t'(PN);
            a0 = reuse ? prev.x + coord_t'(R + 1) : k.x - coord_t'(R);
            a1 = k.x + coord_t'(R);
            b0 = k.y - coord_t'(R);
            b1 = k.y + coord_t'(R);
            if (reuse) n_reuse <= n_reuse + 1'b1;
            odd <= k.scale[0];
            c0p <= a0[1:0]; r0p <= b0[1:0];
            if (k.scale[0]) begin
              qc0 <= src(a0); qc1 <= src(a1) + coord_t'(a1[1:0] != 2'd0);
              qr0 <= src(b0); qr1 <= src(b1) + coord_t'(b1[1:0] != 2'd0);
              need_rows <= src(b1) + coord_t'(b1[1:0] != 2'd0) + 1'b1;
            end else begin
              qc0 <= a0; qc1 <= a1; qr0 <= b0; qr1 <= b1;
              need_rows <= b1 + 1'b1;
            end
            slot0     <= 6'(int'(a0) % PN);
            cur_kslot <= 6'((int'(k.x) - R) % PN);
            cur_kp    <= k;
            state     <= WAIT;
          end
        end
        WAIT: if ((k.scale[1] ? rows_done2 : rows_done0) >= need_rows) begin
          qr <= qr0; qc <= qc0; req_done <= 1'b0;
          pr <= qr0; pc <= qc0;
          phc <= {1'b0, c0p}; phr <= {1'b0, r0p};
          first_c <= 1'b1; first_r <= 1'b1;
          slot <= slot0; trow <= '0; ti <= '0;
          fetch_on <= 1'b1; stream_on <= 1'b1;
          si <= '0; sj <= '0; sslot <= cur_kslot;
          state <= FETCH;
        end
        FETCH: begin
          if (rd_valid && rd_ready) begin
            if (qc == qc1) begin
              qc <= qc0;
              if (qr == qr1) req_done <= 1'b1;
              else qr <= qr + 1'b1;
            end else qc <= qc + 1'b1;
          end
          if (rsp_valid) begin
            n_fetch  <= n_fetch + 1'b1;
            prev_pix <= rsp_data;
            if (h_out) begin
              if (odd) hline[ti] <= h_val;
              ti   <= ti + 1'b1;
              slot <= (slot == 6'(PN - 1)) ? '0 : slot + 1'b1;
            end
            if (pc == qc1) begin
              // end of a source row
              pc <= qc0; phc <= {1'b0, c0p}; first_c <= 1'b1;
              ti <= '0; slot <= slot0;
              if (v_out) trow <= trow + 1'b1;
              first_r <= 1'b0;
              phr <= (phr == 3'd4) ? 3'd0 : phr + 1'b1;
              if (pr == qr1) fetch_on <= 1'b0;
              pr <= pr + 1'b1;
            end else begin
              pc <= pc + 1'b1;
              phc <= (phc == 3'd4) ? 3'd0 : phc + 1'b1;
              first_c <= 1'b0;
            end
          end
        end
        HOLD: if (desc_done) begin
          prev   <= k;
          prev_v <= 1'b1;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
      // Stream: address (si, sj) now; data and write one cycle later. It runs
      // alongside the fetch, one patch row behind it.
      if (s_step) begin
        s_v     <= 1'b1;
        s_first <= (si == '0) && (sj == '0);
        s_i_q   <= si;
        s_j_q   <= sj;
        if (sj == 6'(PN - 1)) begin
          sj <= '0; si <= si + 1'b1; sslot <= cur_kslot;
        end else begin
          sj <= sj + 1'b1;
          sslot <= (sslot == 6'(PN - 1)) ? '0 : sslot + 1'b1;
        end
        if ((si == 6'(PN - 1)) && (sj == 6'(PN - 1))) begin
          stream_on <= 1'b0;
          state     <= HOLD;
        end
      end
      // the reuse buffer holds columns of the previous frame
      if (new_frame) prev_v <= 1'b0;
    end
  end

  assign pw_en   = s_v;
  assign pw_col  = s_j_q;
  assign pw_row  = s_i_q;
  assign pw_data = ra_data;
  assign o_valid = s_v;
  assign o_first = s_first;
  assign o_pix   = ra_data;

  // A response never arrives outside a fetch.
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> state == FETCH);
  // Both patch stores are only written inside the 43 x 43 area.
  assert property (@(posedge clk) disable iff (!rst_n) rw_en |-> (int'(rw_slot) < PN && int'(rw_row) < PN));
  assert property (@(posedge clk) disable iff (!rst_n) pw_en |-> (int'(pw_col) < PN && int'(pw_row) < PN));
endmodule
