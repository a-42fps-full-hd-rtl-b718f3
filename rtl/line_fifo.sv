// line_fifo: fixed-length delay line of DEPTH words, the building block of the
// row FIFOs in the source buffer and of the candidate buffer in the NMS.
//
// The store is an array of DEPTH-1 words plus the output register. On every
// clock edge with en high the word at the current address is moved to dout
// and replaced by din, and the address advances modulo DEPTH-1. Between
// enabled edges dout therefore holds the word written DEPTH enabled edges
// before the one now waiting at din: with DEPTH equal to the row length,
// dout is the pixel directly above the pixel presented at din. DEPTH must be
// at least 2. Contents are not reset.
module line_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1920
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int N  = DEPTH - 1;
  localparam int AW = (N > 1) ? $clog2(N) : 1;
  logic [WIDTH-1:0] mem [N];
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (en) begin
      dout      <= mem[addr];
      mem[addr] <= din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else if (en) addr <= (addr == AW'(N - 1)) ? '0 : addr + 1'b1;
  end
endmodule
