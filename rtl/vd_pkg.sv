// vd_pkg: sizes and helper functions shared by the volumetric-display
// programmable-logic blocks.
//
// The voxel space is a GRID x GRID x GRID cube of one-bit voxels (20^3 = 8000
// bits). A voxel (x, y, z) sits at bit x + GRID*y + GRID*GRID*z of a flat
// model vector, so the GRID*GRID bits of one z level are contiguous and a
// two-dimensional slice bit (x, y) has the same index as the voxel (x, y, 0).
// A model is stored as RD_DEPTH words of RD_WIDTH bits (160 x 50 bits); word a
// holds model bits [RD_WIDTH*a +: RD_WIDTH]. The twenty slices are written to
// the slice memory as 32-bit words, thirteen per slice, most significant part
// first, the last word padded with zeros in its low half.
//
// helix_voxel() defines the contents of the twenty preloaded helix models:
// the helicoid is a straight blade through the vertical axis whose angle
// turns by 2*ROT_STEP per z level (one full turn over the height), and
// rotation r adds r*ROT_STEP, with ROT_STEP = 180/N_ROT = 9 degrees. A voxel
// is set when its centre lies within half a voxel of the blade and inside the
// cylinder of radius GRID/2. Angles are multiples of 9 degrees, so the
// arithmetic uses the integer table SIN9[k] = round(1024*sin(9k degrees)),
// k = 0..10, and stays exact and synthesizable.
package vd_pkg;

  localparam int unsigned GRID       = 20;                    // voxels per axis
  localparam int unsigned SLICE_BITS = GRID * GRID;           // 400
  localparam int unsigned VOXELS     = GRID * GRID * GRID;    // 8000
  localparam int unsigned N_ROT      = 20;                    // helix rotations (slices)
  localparam int unsigned RD_WIDTH   = 50;                    // model BRAM word width
  localparam int unsigned RD_DEPTH   = VOXELS / RD_WIDTH;     // 160
  localparam int unsigned RD_AW      = 8;                     // model BRAM address width
  localparam int unsigned WR_WIDTH   = 32;                    // slice BRAM word width
  localparam int unsigned WR_AW      = 14;                    // slice BRAM address width
  localparam int unsigned WORDS_PER_SLICE = (SLICE_BITS + WR_WIDTH - 1) / WR_WIDTH; // 13
  localparam int unsigned SLICE_WORDS     = WORDS_PER_SLICE * N_ROT;                // 260

  typedef logic [VOXELS-1:0]     model_t;
  typedef logic [SLICE_BITS-1:0] slice_t;
  typedef logic [RD_WIDTH-1:0]   rd_word_t;
  typedef logic [WR_WIDTH-1:0]   wr_word_t;

  // round(1024 * sin(9*k degrees)), k = 0..10 (0 .. 90 degrees)
  function automatic int sin9(input int k);
    case (k)
      0:  return 0;
      1:  return 160;
      2:  return 316;
      3:  return 465;
      4:  return 602;
      5:  return 724;
      6:  return 828;
      7:  return 912;
      8:  return 974;
      9:  return 1011;
      default: return 1024;
    endcase
  endfunction

  // sin and cos of k*9 degrees for any k, scaled by 1024
  function automatic int sin_k(input int k);
    int m;
    m = k % 40;
    if (m < 0) m += 40;
    if (m <= 10)      return  sin9(m);
    else if (m <= 20) return  sin9(20 - m);
    else if (m <= 30) return -sin9(m - 20);
    else              return -sin9(40 - m);
  endfunction

  function automatic int cos_k(input int k);
    return sin_k(k + 10);
  endfunction

  // Word `addr` of helix model `rot`, as stored in its BRAM. A word never
  // spans two z levels (SLICE_BITS is a multiple of RD_WIDTH), so the blade
  // angle, 9 * (rot + 2z) degrees, and its direction (c, s) = 1024 * (cos,
  // sin) are worked out once per word. Bit b is the voxel at x = n % GRID,
  // y = (n % SLICE_BITS) / GRID with n = 50 * addr + b. With the doubled
  // offsets dx, dy of the voxel centre from the axis, dx * s - dy * c is
  // 2 * 1024 times the centre's distance from the blade: the voxel is set
  // when that distance is at most half a voxel and the centre lies inside
  // the cylinder of radius GRID / 2. The loop body is kept to a few
  // statements because all twenty models are evaluated at elaboration.
  function automatic rd_word_t helix_word(input int rot, input int addr);
    rd_word_t w;
    int base, k, s, c, dx, dy;
    base = addr * RD_WIDTH;
    k    = rot + 2 * (base / SLICE_BITS);
    s    = sin_k(k);
    c    = cos_k(k);
    for (int b = 0; b < RD_WIDTH; b++) begin
      dx   = 2 * ((base + b) % GRID) - (GRID - 1);
      dy   = 2 * (((base + b) % SLICE_BITS) / GRID) - (GRID - 1);
      w[b] = (dx * s - dy * c >= -1024) && (dx * s - dy * c <= 1024)
             && (dx * dx + dy * dy <= GRID * GRID);
    end
    return w;
  endfunction

endpackage
