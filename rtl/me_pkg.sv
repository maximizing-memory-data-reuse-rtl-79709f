// me_pkg: types shared by the four-way data-reuse motion estimator.
//
// Pixels are 8-bit luminance samples. A sum of absolute differences (SAD)
// is carried in 16 bits, enough for a 16x16 block (16*16*255 = 65280), the
// largest block size the estimator is written for. Motion vector components
// are signed 8-bit values (search ranges up to +/-127 pixels).
// The four current blocks handled together form a 2x2 "quad"; they are
// numbered A=0 (top left), B=1 (top right), C=2 (bottom left), D=3 (bottom
// right), so bit 0 of the index is the column and bit 1 the row.
package me_pkg;

  typedef logic [7:0]         pixel_t;
  typedef logic [15:0]        sad_t;
  typedef logic signed [7:0]  mv_t;

  localparam int unsigned NBLK = 4;   // current blocks per quad

  // Four current pixels, one per block of the quad, that share one search pixel.
  typedef pixel_t [NBLK-1:0]  pix4_t;
  typedef sad_t   [NBLK-1:0]  sad4_t;

  // One best match found for one block.
  typedef struct packed {
    logic found;   // at least one candidate of the search range lay inside the frame
    sad_t sad;     // minimum SAD, u in the cost function
    mv_t  mv_x;    // horizontal displacement, negative = left
    mv_t  mv_y;    // vertical displacement, negative = up
  } mv_result_t;

  // Phase of the quad sequencer.
  typedef enum logic [3:0] {
    ST_IDLE,
    ST_CUR,     // load the four current blocks
    ST_CURN,    // load the left half of the next column's quad
    ST_SRCH,    // load new rows of search data
    ST_SETTLE,  // last read lands
    ST_PASS,    // one vertical offset: N rows of W pixels through the PE arrays
    ST_GAP,     // PE sums are captured into the result shift register
    ST_DRAIN,   // result shift register empties into the comparators
    ST_OUT      // results presented
  } me_state_e;

  function automatic int unsigned sad_bound(int unsigned n);
    return n * n * 255;
  endfunction

endpackage
