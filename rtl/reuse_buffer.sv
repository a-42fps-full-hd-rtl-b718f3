// reuse_buffer: storage for the patch columns shared by consecutive keypoints.
//
// 43 x 43 pixels. A pixel of frame column c and patch row r lives at slot
// (c mod 43, r), so columns that two overlapping patches share never move:
// only the new columns of the next patch are written, over the columns that
// dropped out. One write port (patch loader) and two read ports: port A
// streams the patch to orientation and to the patch buffer, port B serves
// pixel a of each descriptor test. Reads are registered (one cycle latency).
// The slot-per-column organisation is this design's way of providing the
// described reuse.
module reuse_buffer
  import orb_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [5:0] w_slot,
  input  logic [5:0] w_row,
  input  pix_t       w_data,
  input  logic [5:0] ra_slot,
  input  logic [5:0] ra_row,
  output pix_t       ra_data,
  input  logic [5:0] rb_slot,
  input  logic [5:0] rb_row,
  output pix_t       rb_data
);
  pix_t mem [PATCH_N * PATCH_N];

  function automatic int idx(logic [5:0] slot, logic [5:0] row);
    return int'(slot) * PATCH_N + int'(row);
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[idx(w_slot, w_row)] <= w_data;
    ra_data <= mem[idx(ra_slot, ra_row)];
    rb_data <= mem[idx(rb_slot, rb_row)];
  end

  // The write address is checked by the patch loader, which has a reset.
endmodule
