// patch_buffer: the current keypoint's 43 x 43 patch for descriptor
// generation.
//
// Written once per keypoint, pixel by pixel, while the patch is streamed out
// of the reuse buffer; read at (column, row) of the patch, with the keypoint
// at (21, 21), for pixel b of each descriptor test. Because the same patch is
// also in the reuse buffer, both pixels of a test are read in the same cycle.
// One write and one registered read port.
module patch_buffer
  import orb_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [5:0] w_col,
  input  logic [5:0] w_row,
  input  pix_t       w_data,
  input  logic [5:0] r_col,
  input  logic [5:0] r_row,
  output pix_t       r_data
);
  pix_t mem [PATCH_N * PATCH_N];

  always_ff @(posedge clk) begin
    if (we) mem[int'(w_row) * PATCH_N + int'(w_col)] <= w_data;
    r_data <= mem[int'(r_row) * PATCH_N + int'(r_col)];
  end

  // The write address is checked by the patch loader, which has a reset.
endmodule
