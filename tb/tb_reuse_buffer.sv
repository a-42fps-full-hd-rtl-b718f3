// Testbench for reuse_buffer: random writes over all slots and rows, then
// random reads on both ports against a model array (one cycle latency).
module tb_reuse_buffer;
  import orb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [5:0] w_slot, w_row, ra_slot, ra_row, rb_slot, rb_row;
  pix_t w_data, ra_data, rb_data;
  pix_t model [43][43];
  reuse_buffer dut (.clk(clk), .we(we), .w_slot(w_slot), .w_row(w_row), .w_data(w_data),
    .ra_slot(ra_slot), .ra_row(ra_row), .ra_data(ra_data),
    .rb_slot(rb_slot), .rb_row(rb_row), .rb_data(rb_data));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ra_slot = 0; ra_row = 0; rb_slot = 0; rb_row = 0;
    for (int s = 0; s < 43; s++)
      for (int r = 0; r < 43; r++) begin
        @(negedge clk);
        we = 1; w_slot = 6'(s); w_row = 6'(r); w_data = 8'($urandom); model[s][r] = w_data;
      end
    for (int n = 0; n < 5000; n++) begin
      logic [5:0] as, ar, bs, br;
      @(negedge clk);
      // overwrite one entry while reading two others
      we = 1; w_slot = 6'($urandom_range(0, 42)); w_row = 6'($urandom_range(0, 42)); w_data = 8'($urandom);
      as = 6'($urandom_range(0, 42)); ar = 6'($urandom_range(0, 42));
      bs = 6'($urandom_range(0, 42)); br = 6'($urandom_range(0, 42));
      if (as == w_slot && ar == w_row) ar = (ar == 0) ? 1 : 0;
      if (bs == w_slot && br == w_row) br = (br == 0) ? 1 : 0;
      ra_slot = as; ra_row = ar; rb_slot = bs; rb_row = br;
      @(posedge clk); #1;
      checks += 2;
      if (ra_data !== model[as][ar]) failures++;
      if (rb_data !== model[bs][br]) failures++;
      model[w_slot][w_row] = w_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
