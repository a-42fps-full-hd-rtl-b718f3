// Testbench for descriptor_buffer: random features pushed only while
// has_room is high and popped with a random ready; order, contents and the
// full condition are checked.
module tb_descriptor_buffer;
  import orb_pkg::*;
  localparam int D = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  feat_t in_feat, out_feat;
  logic has_room, out_valid;
  feat_t q [$];
  int nfull = 0;
  descriptor_buffer #(.DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_feat(in_feat),
    .has_room(has_room), .out_valid(out_valid), .out_ready(out_ready), .out_feat(out_feat));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nfull = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = has_room && ($urandom_range(0, 1) == 1);
      for (int w = 0; w < 9; w++) in_feat[w * 32 +: 32] = $urandom;
      out_ready = (n < 1000) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 1) == 1);
      if (!has_room) nfull++;
      checks++;
      if (has_room !== (q.size() < D - 1)) failures++;
      checks++;
      if (out_valid !== (q.size() != 0)) failures++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_feat !== q[0]) failures++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid) q.push_back(in_feat);
    end
    checks++; if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
