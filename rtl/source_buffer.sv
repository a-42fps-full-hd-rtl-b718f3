// source_buffer: the row store in front of each scale's 7x7 window.
//
// Seven row FIFOs, each ROW_LEN pixels long, are connected end to end: on every
// accepted pixel the output of one FIFO is written into the next one and, at
// the same time, handed to the window register file. rows[k] is therefore the
// pixel k+1 rows above the pixel currently presented at in_pix (same column),
// valid combinationally while en is low and sampled together with in_pix on the
// next enabled edge. There is no handshake: en marks a valid input pixel.
// Structure and sizes (seven FIFOs of one row each) follow the described
// architecture; the FIFOs are registered-output delay lines.
module source_buffer
  import orb_pkg::*;
#(
  parameter int ROW_LEN = 1920,
  parameter int NROWS   = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t in_pix,
  output pix_t rows [NROWS]
);
  for (genvar k = 0; k < NROWS; k++) begin : g_row
    pix_t din;
    if (k == 0) begin : g_first
      assign din = in_pix;
    end else begin : g_next
      assign din = rows[k-1];
    end
    line_fifo #(.WIDTH(PIX_W), .DEPTH(ROW_LEN)) u_fifo (
      .clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(rows[k])
    );
  end
endmodule
