// window_regfile: 7x7 register file that turns the row FIFO outputs into a
// sliding window over the frame.
//
// On each enabled edge every row shifts one place to the left and the column
// col_in enters at position 0. win[r][c] then holds the pixel c columns to the
// left of the newest column and r+1 rows above the pixel that was accepted on
// that edge; the window centre is win[3][3]. Function units (FAST, smoothing,
// downsampling) read the window concurrently. Reset clears the window.
module window_regfile
  import orb_pkg::*;
#(
  parameter int N = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t col_in [N],
  output pix_t win [N][N]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) win[r][c] <= '0;
    end else if (en) begin
      for (int r = 0; r < N; r++) begin
        win[r][0] <= col_in[r];
        for (int c = 1; c < N; c++) win[r][c] <= win[r][c-1];
      end
    end
  end
endmodule
