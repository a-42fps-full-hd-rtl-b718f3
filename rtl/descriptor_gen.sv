// descriptor_gen: rotated BRIEF, one binary test per cycle, 256 tests.
//
// On start the unit takes the orientation id (0..31, steps of 11.25 degrees)
// and the reuse-buffer slot of the patch's first column. sin and cos of the
// angle come from a nine-entry quarter-wave table in Q8 (round(256*sin(k *
// 11.25 deg)), k = 0..8) by symmetry. For test i the fixed pair of offsets
// (ax, ay), (bx, by) in [-15, 15] is rotated,
//   xr = x cos - y sin,  yr = y cos + x sin   (rounded, |xr|, |yr| <= 21),
// pixel a is read from the reuse buffer and pixel b from the patch buffer in
// the same cycle, and bit i of the descriptor is 1 when I(a) < I(b). The bits
// are shifted into the descriptor register, so after 256 + 2 cycles desc[i]
// holds test i and done pulses. The learned ORB test pattern is not
// reproduced here: the 256 pairs are drawn from a 32-bit xorshift generator
// with a fixed seed (each coordinate = (v mod 31) - 15 for the next word v),
// computed at elaboration into a constant table.
module descriptor_gen
  import orb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] orient,
  input  logic [5:0] kslot,     // reuse-buffer slot of patch column 0
  output logic       busy,
  // reuse buffer read (pixel a)
  output logic [5:0] ra_slot,
  output logic [5:0] ra_row,
  input  pix_t       ra_data,
  // patch buffer read (pixel b)
  output logic [5:0] rb_col,
  output logic [5:0] rb_row,
  input  pix_t       rb_data,
  output logic       done,
  output logic [DESC_BITS-1:0] desc
);
  typedef logic signed [5:0] off_t;
  typedef struct packed { off_t ax; off_t ay; off_t bx; off_t by; } pair_t;

  function automatic logic [31:0] xs32(logic [31:0] v);
    v = v ^ (v << 13);
    v = v ^ (v >> 17);
    v = v ^ (v << 5);
    return v;
  endfunction

  function automatic off_t coord(logic [31:0] v);
    return off_t'(int'(v % 32'd31) - 15);
  endfunction

  typedef pair_t [DESC_BITS-1:0] pattern_t;
  function automatic pattern_t make_pattern();
    pattern_t p;
    logic [31:0] v;
    v = 32'h2545F491;
    for (int i = 0; i < DESC_BITS; i++) begin
      v = xs32(v); p[i].ax = coord(v);
      v = xs32(v); p[i].ay = coord(v);
      v = xs32(v); p[i].bx = coord(v);
      v = xs32(v); p[i].by = coord(v);
    end
    return p;
  endfunction

  localparam pattern_t PATTERN = make_pattern();
  localparam logic [8:0] SIN_Q [9] = '{9'd0, 9'd50, 9'd98, 9'd142, 9'd181, 9'd213, 9'd237, 9'd251, 9'd256};

  function automatic logic signed [9:0] sin_q8(logic [4:0] id);
    logic [2:0] k;
    k = id[2:0];
    case (id[4:3])
      2'd0: return  $signed({1'b0, SIN_Q[k]});
      2'd1: return  $signed({1'b0, SIN_Q[4'd8 - {1'b0, k}]});
      2'd2: return -$signed({1'b0, SIN_Q[k]});
      default: return -$signed({1'b0, SIN_Q[4'd8 - {1'b0, k}]});
    endcase
  endfunction

  // Rounded rotation of one offset: returns patch index 21 + rotated value.
  function automatic logic [5:0] rot(off_t a, off_t b, logic signed [9:0] c,
                                     logic signed [9:0] s, logic second);
    logic signed [17:0] v;
    logic signed [9:0]  r;
    // first: a*c - b*s (x); second: a*c + b*s with a = y, b = x (y)
    v = second ? (18'(a) * 18'(c) + 18'(b) * 18'(s))
               : (18'(a) * 18'(c) - 18'(b) * 18'(s));
    r = 10'((v + 18'sd128) >>> 8);
    if (r > 10'sd21)  r = 10'sd21;
    if (r < -10'sd21) r = -10'sd21;
    return 6'(r + 10'sd21);
  endfunction

  logic [8:0]        idx;       // test being addressed
  logic              run, cmp_v;
  logic signed [9:0] c_q, s_q;
  logic [5:0]        kslot_q;
  pair_t             pr;
  logic [5:0]        a_col, a_row, b_col, b_row;
  logic [6:0]        a_slot_sum;

  always_comb begin
    pr    = PATTERN[idx[7:0]];
    a_col = rot(pr.ax, pr.ay, c_q, s_q, 1'b0);
    a_row = rot(pr.ay, pr.ax, c_q, s_q, 1'b1);
    b_col = rot(pr.bx, pr.by, c_q, s_q, 1'b0);
    b_row = rot(pr.by, pr.bx, c_q, s_q, 1'b1);
    a_slot_sum = {1'b0, kslot_q} + {1'b0, a_col};
    ra_slot = (a_slot_sum >= 7'(PATCH_N)) ? 6'(a_slot_sum - 7'(PATCH_N)) : a_slot_sum[5:0];
    ra_row  = a_row;
    rb_col  = b_col;
    rb_row  = b_row;
  end

  assign busy = run || cmp_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      run     <= 1'b0;
      cmp_v   <= 1'b0;
      c_q     <= '0;
      s_q     <= '0;
      kslot_q <= '0;
      done    <= 1'b0;
      desc    <= '0;
    end else begin
      done  <= 1'b0;
      cmp_v <= run;
      if (start && !busy) begin
        run     <= 1'b1;
        idx     <= '0;
        c_q     <= sin_q8(orient + 5'd8);
        s_q     <= sin_q8(orient);
        kslot_q <= kslot;
      end else if (run) begin
        idx <= idx + 1'b1;
        if (idx == 9'(DESC_BITS - 1)) run <= 1'b0;
      end
      if (cmp_v) begin
        desc <= {ra_data < rb_data, desc[DESC_BITS-1:1]};
        if (!run) done <= 1'b1;
      end
    end
  end
endmodule
