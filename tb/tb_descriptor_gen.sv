// Testbench for descriptor_gen: the reuse and patch buffers are modelled as
// registered reads of one random patch (the reuse copy stored at slot
// (j + kslot) mod 43). For every orientation id the 256 bits are compared
// with the reference rotated-BRIEF and the run must take 258 cycles.
module tb_descriptor_gen;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] orient;
  logic [5:0] kslot;
  logic busy, done;
  logic [5:0] ra_slot, ra_row, rb_col, rb_row;
  pix_t ra_data, rb_data;
  logic [255:0] desc;
  img_t p;
  pix_t pm [43 * 43];
  int col;

  descriptor_gen dut (.clk(clk), .rst_n(rst_n), .start(start), .orient(orient), .kslot(kslot),
    .busy(busy), .ra_slot(ra_slot), .ra_row(ra_row), .ra_data(ra_data),
    .rb_col(rb_col), .rb_row(rb_row), .rb_data(rb_data), .done(done), .desc(desc));
  always #5 clk = ~clk;

  assign col = (int'(ra_slot) - int'(kslot) + 43) % 43;
  always @(posedge clk) begin
    ra_data <= pm[int'(ra_row) * 43 + col];
    rb_data <= pm[int'(rb_row) * 43 + int'(rb_col)];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    p = new[43 * 43];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 96; n++) begin
      bit [255:0] e;
      int cyc;
      for (int i = 0; i < 43 * 43; i++) begin p[i] = 8'($urandom); pm[i] = p[i]; end
      @(negedge clk);
      orient = 5'(n % 32);
      kslot = 6'($urandom_range(0, 42));
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      e = descriptor(p, n % 32);
      checks++;
      if (desc !== e) begin failures++; if (failures < 5) $display("id %0d: %0d bits differ", n % 32, $countones(desc ^ e)); end
      checks++;
      if (cyc != 258) begin failures++; $display("took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
