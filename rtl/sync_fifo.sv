// sync_fifo: single-clock first-in first-out queue, used for the local and
// global keypoint buffers and the smoothed-image buffers.
//
// The store is an array of DEPTH words with read and write pointers and an
// occupancy count; DEPTH need not be a power of two. Ports follow a
// valid/ready handshake on both sides: a word is written when wr_valid and
// wr_ready are high on a clock edge, and rd_data shows the oldest word
// whenever rd_valid is high (first-word fall-through), removed when rd_ready
// is high. Reset empties the queue.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_wr, do_rd;

  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (count != '0);
  assign do_wr = wr_valid && wr_ready;
  assign do_rd = rd_valid && rd_ready;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end

  // A write is never accepted into a full queue, a read never from an empty one.
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);
endmodule
