// thin_pkg: types and constants shared by the thinning processor.
//
// The processor looks at a 4x4 window of the binary image. A window is
// stored as win_t, indexed w[row][col] with row 0 at the top (oldest image
// line) and col 0 at the left (oldest pixel of a line). The pixel under test
// (the centre) is w[1][1]; the 3x3 neighbourhood is rows 0..2, cols 0..2, and
// the extra row 3 and column 3 are the pixels one further below and one
// further to the right, used by the 1x4/4x1 windows and the extended
// trimming templates. The width range 25..40 pixels is the one of the
// original processor; everything else here is a naming choice of this design.
package thin_pkg;

  // Image width range accepted by the variable-width line delays.
  localparam int unsigned MIN_WIDTH_DEF = 25;
  localparam int unsigned MAX_WIDTH_DEF = 40;

  // 4x4 window, w[row][col], row 0 = top, col 0 = left.
  typedef logic [3:0][3:0] win_t;

  // Which template family removed (or kept) the centre pixel.
  typedef struct packed {
    logic thin;    // one of the eight thinning templates matched
    logic save;    // a 1x4 or 4x1 window matched (keeps the pixel)
    logic trim;    // one of the trimming templates matched
    logic remove;  // final decision: centre pixel is cleared
  } hit_t;

endpackage
