// keypoint_buffer: the global keypoint buffer, four FIFOs (one per scale)
// between the detectors and the descriptor side.
//
// Each detector pushes keypoints (x, y, 22 bits) with a valid pulse; a push
// into a full FIFO is dropped and raises that scale's sticky overflow flag.
// The read side offers one keypoint at a time, tagged with its scale, on a
// valid/ready handshake. Arbitration keeps reading the same FIFO while its
// next keypoint lies in the same row as the one just served, so that
// consecutive patches overlap and can be reused; otherwise it moves round-robin
// to the next non-empty FIFO. Four FIFOs of 512 entries give the stated 44
// kbit; depth and the arbitration rule are this design's choice.
module keypoint_buffer
  import orb_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] in_valid,
  input  kp_t        in_kp [4],
  output logic       out_valid,
  input  logic       out_ready,
  output kps_t       out_kp,
  output logic [3:0] overflow
);
  logic [3:0] wr_ready, rd_valid, rd_ready;
  kp_t        head [4];
  logic [1:0] sel, last;
  logic       have_last;
  coord_t     last_y;

  for (genvar s = 0; s < 4; s++) begin : g_fifo
    logic [$clog2(DEPTH+1)-1:0] cnt;
    sync_fifo #(.WIDTH($bits(kp_t)), .DEPTH(DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .wr_valid(in_valid[s]), .wr_ready(wr_ready[s]), .wr_data(in_kp[s]),
      .rd_valid(rd_valid[s]), .rd_ready(rd_ready[s]), .rd_data(head[s]),
      .count(cnt)
    );
  end

  // Choose the FIFO to serve.
  logic [1:0] cand [4];
  for (genvar k = 0; k < 4; k++) begin : g_cand
    assign cand[k] = last + 2'(k + 1);
  end

  always_comb begin
    sel = last;
    if (!(have_last && rd_valid[last] && head[last].y == last_y)) begin
      for (int k = 3; k >= 0; k--)
        if (rd_valid[cand[k]]) sel = cand[k];
    end
  end

  assign out_valid = rd_valid[sel];
  assign out_kp    = '{scale: sel, x: head[sel].x, y: head[sel].y};
  for (genvar s = 0; s < 4; s++) begin : g_rd
    assign rd_ready[s] = out_ready && out_valid && (sel == 2'(s));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= 2'd3;
      have_last <= 1'b0;
      last_y    <= '0;
      overflow  <= '0;
    end else begin
      if (out_valid && out_ready) begin
        last      <= sel;
        have_last <= 1'b1;
        last_y    <= head[sel].y;
      end
      for (int s = 0; s < 4; s++)
        if (in_valid[s] && !wr_ready[s]) overflow[s] <= 1'b1;
    end
  end
endmodule
