// ext_mem_model: behavioural model of the external DRAM seen by the
// accelerator (not synthesizable, testbench use only). Two byte-write
// channels and one byte-read channel, each with a valid/ready handshake whose
// ready is randomly withheld (STALL_PCT percent of cycles for reads,
// WR_STALL_PCT for writes); read data return
// in order, LAT cycles after the request is accepted, one per cycle. The
// array is public so that testbenches can preload and inspect it.
module ext_mem_model #(
  parameter int SIZE      = 1 << 22,
  parameter int LAT       = 6,
  parameter int STALL_PCT = 20,
  parameter int WR_STALL_PCT = STALL_PCT
) (
  input  logic        clk,
  input  logic        wr0_valid,
  output logic        wr0_ready,
  input  logic [23:0] wr0_addr,
  input  logic [7:0]  wr0_data,
  input  logic        wr2_valid,
  output logic        wr2_ready,
  input  logic [23:0] wr2_addr,
  input  logic [7:0]  wr2_data,
  input  logic        rd_valid,
  output logic        rd_ready,
  input  logic [23:0] rd_addr,
  output logic        rsp_valid,
  output logic [7:0]  rsp_data
);
  logic [7:0] mem [SIZE];
  logic [7:0] pipe_d [LAT];
  logic       pipe_v [LAT];
  int n_stall;

  initial begin
    wr0_ready = 0; wr2_ready = 0; rd_ready = 0; n_stall = 0;
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 0; pipe_d[i] = 0; end
  end

  always @(negedge clk) begin
    wr0_ready <= ($urandom_range(0, 99) >= WR_STALL_PCT);
    wr2_ready <= ($urandom_range(0, 99) >= WR_STALL_PCT);
    rd_ready  <= ($urandom_range(0, 99) >= STALL_PCT);
  end

  assign rsp_valid = pipe_v[LAT-1];
  assign rsp_data  = pipe_d[LAT-1];

  always @(posedge clk) begin
    if (wr0_valid && wr0_ready) mem[wr0_addr] <= wr0_data;
    if (wr2_valid && wr2_ready) mem[wr2_addr] <= wr2_data;
    if ((wr0_valid && !wr0_ready) || (wr2_valid && !wr2_ready) || (rd_valid && !rd_ready)) n_stall++;
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= rd_valid && rd_ready;
    pipe_d[0] <= mem[rd_addr];
  end
endmodule
