// median_pkg: types and constants shared by the Bayer median defect-correction filter.
//
// The filter works on a 5x5 window (FILT_N) of 10-bit raw sensor samples (PIX_W). It
// compares each pixel with its 8 nearest neighbours of the same colour (NEIGH). The window
// size, the 8-neighbour rule and the 10-bit sample width follow the filter's description.
// The 12-bit image coordinate width (up to 4096 x 4096 pixels) is this design's choice.
package median_pkg;
  localparam int unsigned FILT_N = 5;   // filter window is FILT_N x FILT_N
  localparam int unsigned NEIGH  = 8;   // same-colour neighbours compared with the centre
  localparam int unsigned PIX_W  = 10;  // raw sample width
  localparam int unsigned CRD_W  = 12;  // row/column coordinate width

  // Cycles from a window being complete (centre in the window pipeline) to the
  // corrected pixel: one stage per neighbour inserted into the sort, plus the decision.
  localparam int unsigned CORE_LAT = NEIGH + 1;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [CRD_W-1:0] coord_t;

  // Per-pixel control information that travels with a centre pixel through the
  // sorting pipeline: where the result goes and whether the filter may change it.
  typedef struct packed {
    logic   last;    // final position of the whole image
    logic   write;   // the result is to be written to the output image
    logic   filter;  // the window is complete: the median rule applies (else copy centre)
    coord_t row;     // image row of the centre pixel
    coord_t col;     // image column of the centre pixel
  } tag_t;
endpackage
