// bayer_window_select: picks the centre pixel and its 8 same-colour neighbours from a 5x5
// window of raw Bayer samples.
//
// In a Bayer mosaic the green samples form a checkerboard and red and blue each sit on every
// other row and column. For a green centre the 8 nearest greens form a diamond: the four
// diagonal neighbours and the four samples two steps away along the row and the column. For
// a red or blue centre the 8 nearest same-colour samples form a square: the four samples two
// steps away along the row and column and the four corners of the 5x5 window. Both colours
// share one 5x5 input pipeline and differ only in which registers they read. These windows
// follow the filter's description. The order of the neighbours at the output is this
// design's choice: the four samples shared by both colours come first.
//
// Combinational. win uses the window_pipeline convention: win[c][r], with c counted from
// east and r from south, so the centre is win[2][2].
module bayer_window_select
  import median_pkg::*;
(
  input  pixel_t win [FILT_N][FILT_N],
  input  logic   green,                 // the centre pixel is green
  output pixel_t center,
  output pixel_t neigh [NEIGH]
);
  always_comb begin
    center   = win[2][2];
    // shared by both colours: two steps north, south, east, west
    neigh[0] = win[2][4];
    neigh[1] = win[2][0];
    neigh[2] = win[0][2];
    neigh[3] = win[4][2];
    if (green) begin            // diagonal neighbours
      neigh[4] = win[1][1];
      neigh[5] = win[1][3];
      neigh[6] = win[3][1];
      neigh[7] = win[3][3];
    end else begin              // window corners
      neigh[4] = win[0][0];
      neigh[5] = win[0][4];
      neigh[6] = win[4][0];
      neigh[7] = win[4][4];
    end
  end
endmodule
