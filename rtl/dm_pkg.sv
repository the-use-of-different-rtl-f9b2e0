// dm_pkg - types and constants shared by the Differences Method streak
// detection chain (two-frame change detection for space-debris images).
//
// The chain works on 16-bit grey-scale pixels.  Both frames are divided into
// a 5 x 5 grid of sub-frames; each sub-frame gets one reference star and one
// displacement vector.  Coordinates are carried as 16-bit unsigned numbers,
// enough for the largest frame size handled (2672 x 4008 pixels).
package dm_pkg;

  localparam int unsigned PIX_W   = 16;           // pixel accuracy
  localparam int unsigned COORD_W = 16;           // row / column width
  localparam int unsigned N_SUB   = 5;            // sub-frames per axis
  localparam int unsigned N_STARS = N_SUB * N_SUB; // one star per sub-frame
  localparam int unsigned DISP_W  = 4;            // signed displacement width

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [COORD_W-1:0] coord_t;

  // Brightest non-saturated star found in one sub-frame (binned coordinates).
  typedef struct packed {
    logic   valid;
    coord_t row;
    coord_t col;
    pix_t   val;
  } star_t;

  // Integer displacement of frame B against frame A for one sub-frame,
  // in binned pixels.
  typedef struct packed {
    logic signed [DISP_W-1:0] dy;
    logic signed [DISP_W-1:0] dx;
  } disp_t;

  // Window of raw pixels around a reference star that is copied into the
  // result image (inclusive bounds).
  typedef struct packed {
    logic   valid;
    coord_t r_lo;
    coord_t r_hi;
    coord_t c_lo;
    coord_t c_hi;
  } star_win_t;

  // One word of the compressed result image: 'run' zero pixels followed by
  // one pixel of value 'val'.
  typedef struct packed {
    logic [15:0] run;
    pix_t        val;
  } rle_word_t;

  // Index (0 .. N_SUB-1) of the sub-frame strip that holds position p when
  // the strips are 'sz' pixels wide.
  function automatic logic [2:0] sub_of(input coord_t p, input int unsigned sz);
    logic [2:0] idx;
    idx = '0;
    for (int unsigned k = 1; k < N_SUB; k++)
      if (32'(p) >= k * sz) idx = 3'(k);
    return idx;
  endfunction

endpackage
