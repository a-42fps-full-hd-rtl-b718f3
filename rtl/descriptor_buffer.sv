// descriptor_buffer: output queue of finished features (scale, position,
// orientation, 256-bit descriptor), read by the host side.
//
// A first-word fall-through FIFO of DEPTH features with a valid/ready read
// port. The descriptor side starts a keypoint only when the buffer has room
// (has_room), so a write is never lost. DEPTH 100 at 285 bits per feature is
// about the stated 28.2 kbit.
module descriptor_buffer
  import orb_pkg::*;
#(
  parameter int DEPTH = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  feat_t in_feat,
  output logic  has_room,
  output logic  out_valid,
  input  logic  out_ready,
  output feat_t out_feat
);
  localparam int AW = $clog2(DEPTH);
  feat_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign do_wr     = in_valid && (count != (AW+1)'(DEPTH));
  assign do_rd     = out_valid && out_ready;
  assign out_valid = (count != '0);
  assign out_feat  = mem[rptr];
  assign has_room  = (count < (AW+1)'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_feat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> count != (AW+1)'(DEPTH));
endmodule
