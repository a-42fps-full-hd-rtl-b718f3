// smooth_writer: the smoothed-image buffer of one stored scale and its write
// channel to external memory.
//
// Scales 1 and 3 of the pyramid are smoothed and offloaded; one writer serves
// each. Smoothed pixels arrive in raster order and wait in a FIFO of DEPTH
// entries (two rows of the full-HD scale; the two writers hold the stated
// 60 kbit of pixels). An entry is the 8-bit pixel plus one flag that marks the
// frame's first pixel (in_x = in_y = 0); the coordinates are not stored. The
// write side keeps its own column and row counters, which the flag resets to
// (0, 0), so the address is BASE + y*W + x with the image stored row after
// row. The write channel sends one byte per beat on a valid/ready handshake.
// rows_done counts the rows of the current frame completely written, so that
// the patch loader never reads a row before it exists; it restarts when a new
// frame's first pixel is written. A pixel arriving at a full FIFO is dropped
// and raises the sticky overflow flag; addresses then stay shifted until the
// next frame starts. The FIFO size follows the document; the frame flag and
// the address counters are this design's choice.
module smooth_writer
  import orb_pkg::*;
#(
  parameter int W     = 1920,
  parameter int DEPTH = 3840,
  parameter int BASE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pix_t              in_pix,
  input  coord_t            in_x,
  input  coord_t            in_y,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output pix_t              wr_data,
  output coord_t            rows_done,
  output logic              overflow
);
  typedef struct packed {
    logic first;
    pix_t pix;
  } sp_t;

  logic   f_ready;
  sp_t    head, in_sp;
  coord_t cx, cy;  // position of the next pixel to write
  coord_t hx, hy;  // position of the FIFO head
  logic [$clog2(DEPTH+1)-1:0] cnt;
  assign in_sp = '{first: (in_x == '0 && in_y == '0), pix: in_pix};

  sync_fifo #(.WIDTH($bits(sp_t)), .DEPTH(DEPTH)) u_buf (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(in_valid), .wr_ready(f_ready), .wr_data(in_sp),
    .rd_valid(wr_valid), .rd_ready(wr_ready), .rd_data(head),
    .count(cnt)
  );

  assign hx      = head.first ? '0 : cx;
  assign hy      = head.first ? '0 : cy;
  assign wr_addr = ADDR_W'(BASE) + ADDR_W'(hy) * ADDR_W'(W) + ADDR_W'(hx);
  assign wr_data = head.pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows_done <= '0;
      overflow  <= 1'b0;
      cx        <= '0;
      cy        <= '0;
    end else begin
      if (in_valid && !f_ready) overflow <= 1'b1;
      if (wr_valid && wr_ready) begin
        if (hx == coord_t'(W - 1)) begin
          cx        <= '0;
          cy        <= hy + 1'b1;
          rows_done <= hy + 1'b1;
        end else begin
          cx <= hx + 1'b1;
          cy <= hy;
          if (head.first) rows_done <= '0;
        end
      end
    end
  end
endmodule
