// strip_sequencer: walks an image in overlapping horizontal processing strips.
//
// The window pipeline can only buffer a strip of strip_rows rows, so the image is cut into
// horizontal strips. Inside a strip the scan is column-major: down a column, then one column
// to the right. Each strip is followed by H = N/2 extra columns that flush the right-hand
// image border through the pipeline, so a strip takes strip_rows * (cols + H) cycles.
// Consecutive strips overlap by N-1 rows, so every interior pixel gets a complete window
// once. The scan order, the N-1 row overlap and the extra H columns per strip follow the
// filter's description.
//
// Edge policy, for the position given as the centre of the window:
//  * filter: H <= row-in-strip < strip_rows-H and H <= col < cols-H. The window is complete
//    and the median rule applies. Outside it the centre pixel is copied unchanged.
//  * write: col < cols, and the image row has not been written by an earlier strip. The
//    bottom H rows of a strip are left to the next strip, except in the last strip. So the
//    top and bottom H rows of the image and the left and right H columns are copied, and
//    every other pixel is filtered exactly once.
// The source listing steps strips by strip_rows-(N-1) and requires the image height to fit
// a whole number of steps. Here the last strip is instead moved up to end on the last image
// row, and rows it repeats are not written again. That is this design's choice.
//
// Interface: start (while idle) loads the configuration and begins at row 0, column 0.
// While active, each cycle with en high advances one position. at_end is high on the final
// position. Requires img_rows >= strip_rows >= 2*H+1 and img_cols >= 1. Outputs are
// combinational from the position registers.
module strip_sequencer
  import median_pkg::*;
#(
  parameter int unsigned N  = 5,                 // filter window size
  parameter int unsigned SW = 7                  // width of strip_rows
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          en,
  input  coord_t        img_rows,
  input  coord_t        img_cols,
  input  logic [SW-1:0] strip_rows,
  output logic          active,
  output coord_t        row,        // image row of the current position
  output coord_t        col,        // image column (cols .. cols+H-1 are flush columns)
  output logic          in_image,   // col < cols: a real pixel to read
  output logic          filter,
  output logic          write,
  output logic          first_strip,
  output logic          last_strip,
  output logic          at_end
);
  localparam int unsigned H = N / 2;

  coord_t        rows_q, cols_q, top_q, lo_row_q;
  logic [SW-1:0] rs_q, i_q;
  logic          first_q;
  coord_t        rs_ext, next_top, step_top;
  logic          col_end, row_end;

  always_comb begin
    rs_ext      = coord_t'(rs_q);
    row         = top_q + coord_t'(i_q);
    in_image    = col < cols_q;
    last_strip  = (top_q + rs_ext) >= rows_q;
    first_strip = first_q;
    row_end     = (i_q == rs_q - 1'b1);
    col_end     = (col == cols_q + coord_t'(H) - 1'b1);
    at_end      = active && row_end && col_end && last_strip;
    filter      = (i_q >= SW'(H)) && (i_q < rs_q - SW'(H)) &&
                  (col >= coord_t'(H)) && (col + coord_t'(H) < cols_q);
    write       = active && in_image && (row >= lo_row_q) &&
                  ((i_q < rs_q - SW'(H)) || last_strip);
    step_top    = top_q + rs_ext - coord_t'(2 * H);
    next_top    = (step_top + rs_ext > rows_q) ? rows_q - rs_ext : step_top;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= 1'b0;
      rows_q   <= '0;
      cols_q   <= '0;
      rs_q     <= '0;
      top_q    <= '0;
      lo_row_q <= '0;
      i_q      <= '0;
      col      <= '0;
      first_q  <= 1'b0;
    end else if (start && !active) begin
      active   <= 1'b1;
      rows_q   <= img_rows;
      cols_q   <= img_cols;
      rs_q     <= strip_rows;
      top_q    <= '0;
      lo_row_q <= '0;
      i_q      <= '0;
      col      <= '0;
      first_q  <= 1'b1;
    end else if (active && en) begin
      if (!row_end) begin
        i_q <= i_q + 1'b1;
      end else begin
        i_q <= '0;
        if (!col_end) begin
          col <= col + 1'b1;
        end else begin
          col <= '0;
          if (last_strip) begin
            active <= 1'b0;
          end else begin
            lo_row_q <= top_q + rs_ext - coord_t'(H);
            top_q    <= next_top;
            first_q  <= 1'b0;
          end
        end
      end
    end
  end
endmodule
