// orb_pkg: types and constants shared by the ORB feature-extraction accelerator.
//
// Pixels are 8-bit grey levels. A FAST score is the sum of up to 16 absolute
// differences of 8-bit pixels, so it fits in 12 bits. Frame coordinates are
// 11 bits (full HD is 1920 x 1080). The pyramid has four scales with a factor
// of 1.25 between them; each 5 source pixels give 4 target pixels, so a width
// W becomes ds_len(W). Scales 1 and 3 (index 0 and 2) are smoothed and stored
// in external memory; scales 2 and 4 are rebuilt from them when a patch is
// loaded. A patch is 43 x 43 pixels: the 31 x 31 BRIEF area rotated by 45
// degrees needs radius 21.
package orb_pkg;

  localparam int PIX_W   = 8;
  localparam int SCORE_W = 12;
  localparam int COORD_W = 11;
  localparam int NSCALES = 4;
  localparam int PATCH_R = 21;               // half size of the stored patch
  localparam int PATCH_N = 2 * PATCH_R + 1;  // 43
  localparam int CENT_R  = 15;               // intensity-centroid radius
  localparam int DESC_BITS = 256;
  localparam int NORIENT = 32;
  localparam int ADDR_W  = 24;               // external memory byte address

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [COORD_W-1:0] coord_t;

  // Keypoint as stored in the global keypoint FIFOs (22 bits per entry).
  typedef struct packed {
    coord_t x;
    coord_t y;
  } kp_t;

  // Keypoint handed to the descriptor side, tagged with its scale.
  typedef struct packed {
    logic [1:0] scale;
    coord_t     x;
    coord_t     y;
  } kps_t;

  // Finished feature.
  typedef struct packed {
    logic [1:0]           scale;
    coord_t               x;
    coord_t               y;
    logic [4:0]           orient;
    logic [DESC_BITS-1:0] desc;
  } feat_t;

  // Number of pixels left after 1.25x downsampling of n pixels: groups of
  // five give four, a partial group of r gives r, r, r-1, r-1 ... (see the
  // downsampler: outputs at source phases 0, 2, 3 and 4).
  function automatic int ds_len(int n);
    int r;
    r = n % 5;
    return 4 * (n / 5) + ((r == 0) ? 0 : (r == 1) ? 1 : r - 1);
  endfunction

  // Width or height of pyramid scale s, counted from 0.
  function automatic int scale_len(int n0, int s);
    int n;
    n = n0;
    for (int i = 0; i < s; i++) n = ds_len(n);
    return n;
  endfunction

endpackage
