// median_filter_top: streaming Bayer median defect-correction filter.
//
// The filter reads a raw Bayer image from memory one pixel per cycle and writes the corrected
// image back, also at most one pixel per cycle. Each pixel is compared with its 8 nearest
// same-colour neighbours. If it lies outside their range it is replaced by their median.
// Two strip_sequencer instances walk the image in overlapping horizontal strips, column-major
// inside a strip. The read sequencer issues addresses. The write sequencer runs the same walk
// 2*strip_rows+4 cycles later, when that pixel sits at the centre of the 5x5 window in
// median_core. Its position and edge policy travel with the pixel through the sort as a tag.
// Every interior pixel is filtered once. The two border rows and columns of the image are
// copied unchanged. A run takes strips * strip_rows * (cols+2) cycles plus
// 2*strip_rows+4+CORE_LAT cycles to fill and drain the pipeline.
//
// The architecture follows the filter's description: one read and one write per cycle,
// strips of up to 64+5 rows limited by 64-entry datapath RAMs, a 5x5 Bayer window, and a
// pruned insertion sort. This design's own choices are the memory interface (row/column
// addresses, read data one cycle after rd_en), the start/busy/done handshake, the optional
// threshold and the handling of the last strip.
//
// Interface:
//  * start (while idle) latches img_rows, img_cols, strip_rows, thresh and green_origin.
//    Requires img_rows >= strip_rows, 7 <= strip_rows <= DEPTH+5, img_cols >= 1.
//  * green_origin: the pixel at row 0, column 0 is green (else red or blue).
//  * rd_en/rd_row/rd_col: read request; rd_data must be valid the following cycle.
//  * wr_en/wr_row/wr_col/wr_data: write of one output pixel. wr_hi/wr_lo flag a pixel
//    replaced because it was above the neighbours' maximum or below their minimum.
//  * busy is high from the cycle after start until done, a one-cycle pulse with the last write.
module median_filter_top
  import median_pkg::*;
#(
  parameter int unsigned DEPTH = 64,   // entries of each datapath shift RAM
  localparam int unsigned SW   = $clog2(DEPTH + FILT_N + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  coord_t        img_rows,
  input  coord_t        img_cols,
  input  logic [SW-1:0] strip_rows,
  input  pixel_t        thresh,
  input  logic          green_origin,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output coord_t        rd_row,
  output coord_t        rd_col,
  input  pixel_t        rd_data,
  output logic          wr_en,
  output coord_t        wr_row,
  output coord_t        wr_col,
  output pixel_t        wr_data,
  output logic          wr_hi,
  output logic          wr_lo
);
  // ---- configuration ----
  logic [SW-1:0] rs_q;
  coord_t        rows_q, cols_q;
  pixel_t        thresh_q;
  logic          gorg_q;
  logic          go;
  assign go = start && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      rs_q     <= '0;
      rows_q   <= '0;
      cols_q   <= '0;
      thresh_q <= '0;
      gorg_q   <= 1'b0;
    end else if (go) begin
      busy     <= 1'b1;
      rs_q     <= strip_rows;
      rows_q   <= img_rows;
      cols_q   <= img_cols;
      thresh_q <= thresh;
      gorg_q   <= green_origin;
    end else if (done) begin
      busy     <= 1'b0;
    end
  end

  // ---- read side ----
  logic   rd_active, rd_in_image;
  coord_t rd_row_s, rd_col_s;
  logic   rd_filter_u, rd_write_u, rd_first_u, rd_last_u, rd_end_u;

  strip_sequencer #(.N(FILT_N), .SW(SW)) u_rd_seq (
    .clk, .rst_n, .start(go), .en(1'b1),
    .img_rows, .img_cols, .strip_rows,
    .active(rd_active), .row(rd_row_s), .col(rd_col_s), .in_image(rd_in_image),
    .filter(rd_filter_u), .write(rd_write_u), .first_strip(rd_first_u),
    .last_strip(rd_last_u), .at_end(rd_end_u)
  );

  assign rd_en  = rd_active && rd_in_image;
  assign rd_row = rd_row_s;
  assign rd_col = rd_col_s;

  // Read data arrives one cycle later; flush columns and the drain feed zeros.
  logic   rd_en_q;
  pixel_t din;
  always_ff @(posedge clk) begin
    if (!rst_n) rd_en_q <= 1'b0;
    else        rd_en_q <= rd_en;
  end
  assign din = rd_en_q ? rd_data : '0;

  // ---- write side: same walk, delayed to the window centre ----
  localparam int unsigned LAG_W = SW + 2;
  logic [LAG_W-1:0] lag_cnt;
  logic             lag_run, wr_start;
  logic [LAG_W-1:0] lag_target;
  assign lag_target = {rs_q, 1'b0} + LAG_W'(3);   // 2*strip_rows + 3
  assign wr_start   = lag_run && (lag_cnt == lag_target);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lag_run <= 1'b0;
      lag_cnt <= '0;
    end else if (go) begin
      lag_run <= 1'b1;
      lag_cnt <= '0;
    end else if (wr_start) begin
      lag_run <= 1'b0;
    end else if (lag_run) begin
      lag_cnt <= lag_cnt + 1'b1;
    end
  end

  logic   ws_active, ws_in_image, ws_filter, ws_write, ws_first_u, ws_last_u, ws_end;
  coord_t ws_row, ws_col;

  strip_sequencer #(.N(FILT_N), .SW(SW)) u_wr_seq (
    .clk, .rst_n, .start(wr_start), .en(1'b1),
    .img_rows(rows_q), .img_cols(cols_q), .strip_rows(rs_q),
    .active(ws_active), .row(ws_row), .col(ws_col), .in_image(ws_in_image),
    .filter(ws_filter), .write(ws_write), .first_strip(ws_first_u),
    .last_strip(ws_last_u), .at_end(ws_end)
  );

  tag_t tag_in, tag_out;
  logic green;
  always_comb begin
    tag_in.last   = ws_end;
    tag_in.write  = ws_write;
    tag_in.filter = ws_filter;
    tag_in.row    = ws_row;
    tag_in.col    = ws_col;
    // Bayer checkerboard: greens sit where row+col has the parity of the origin.
    green         = (ws_row[0] ^ ws_col[0]) ^ gorg_q;
  end

  pixel_t core_pix;
  logic   core_hi, core_lo;

  median_core #(.DEPTH(DEPTH)) u_core (
    .clk, .rst_n, .clr(go), .en(busy), .strip_rows(rs_q), .thresh(thresh_q),
    .din, .green, .tag_in, .pix_out(core_pix), .tag_out, .is_hi(core_hi), .is_lo(core_lo)
  );

  assign wr_en   = busy && tag_out.write;
  assign wr_row  = tag_out.row;
  assign wr_col  = tag_out.col;
  assign wr_data = core_pix;
  assign wr_hi   = wr_en && core_hi;
  assign wr_lo   = wr_en && core_lo;
  assign done    = busy && tag_out.last;
endmodule
