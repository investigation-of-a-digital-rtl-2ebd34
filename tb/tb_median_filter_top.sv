// tb_median_filter_top: end-to-end test of the Bayer median defect-correction filter at its
// default parameters (64-entry shift RAMs, 5x5 window, 10-bit samples).
//
// The testbench owns the image memory. It answers read requests one cycle later and records
// every write. A plain software model of the filter gives the expected output. For each pixel
// not in the two border rows or columns, it collects the 8 nearest same-colour neighbours
// (diamond for green, square for red/blue). A pixel more than thresh above their maximum or
// below their minimum becomes the mean of the middle pair; every other pixel is copied.
// Checked per run:
//  * every pixel is written exactly once and equals the model;
//  * the hi/lo flags match the model;
//  * start to done takes strips*strip_rows*(cols+2) + 2*strip_rows + 13 cycles, the
//    throughput of one pixel per cycle plus two flush columns per strip;
//  * at most one read and one write per cycle (by construction of the ports).
// The runs cover the small and large image sizes of the reference test programme, the
// largest strip the 64-entry RAMs allow (69 rows), a last strip that has to be moved up,
// both Bayer phases and a non-zero threshold. Counts show that each mechanism happened:
// hi and lo replacements on green and on red/blue centres, multi-strip images and moved
// last strips.
module tb_median_filter_top;
  import median_pkg::*;

  localparam int MAXR = 200;
  localparam int MAXC = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start;
  coord_t        img_rows, img_cols;
  logic [6:0]    strip_rows;
  pixel_t        thresh;
  logic          green_origin;
  logic          busy, done, rd_en, wr_en, wr_hi, wr_lo;
  coord_t        rd_row, rd_col, wr_row, wr_col;
  pixel_t        rd_data, wr_data;

  median_filter_top dut (.*);

  pixel_t img    [MAXR][MAXC];
  pixel_t outimg [MAXR][MAXC];
  int     wcount [MAXR][MAXC];
  logic   flag_hi[MAXR][MAXC];
  logic   flag_lo[MAXR][MAXC];

  int checks = 0, failures = 0;
  int n_hi_g = 0, n_hi_rb = 0, n_lo_g = 0, n_lo_rb = 0, n_multi = 0, n_moved = 0;
  int n_thresh_kept = 0, n_copied = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // memory: read data one cycle after the request; writes recorded
  always @(posedge clk) begin
    if (rd_en) rd_data <= img[rd_row][rd_col];
    if (wr_en) begin
      outimg[wr_row][wr_col] <= wr_data;
      wcount[wr_row][wr_col] <= wcount[wr_row][wr_col] + 1;
      flag_hi[wr_row][wr_col] <= wr_hi;
      flag_lo[wr_row][wr_col] <= wr_lo;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reference model of one output pixel
  task automatic model(input int R, input int C, input int r, input int c, input int th,
                       input logic gorg, output int val, output logic hi, output logic lo,
                       output logic green);
    int nb[8];
    int mx, mn, t;
    green = (((r + c) % 2) == 0) == gorg;
    hi = 0; lo = 0;
    val = img[r][c];
    if (r < 2 || r >= R - 2 || c < 2 || c >= C - 2) return;
    nb[0] = img[r-2][c]; nb[1] = img[r+2][c]; nb[2] = img[r][c-2]; nb[3] = img[r][c+2];
    if (green) begin
      nb[4] = img[r-1][c-1]; nb[5] = img[r-1][c+1]; nb[6] = img[r+1][c-1]; nb[7] = img[r+1][c+1];
    end else begin
      nb[4] = img[r-2][c-2]; nb[5] = img[r-2][c+2]; nb[6] = img[r+2][c-2]; nb[7] = img[r+2][c+2];
    end
    // sort descending
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        if (nb[j] > nb[i]) begin t = nb[i]; nb[i] = nb[j]; nb[j] = t; end
    mx = nb[0]; mn = nb[7];
    hi = int'(img[r][c]) > mx + th;
    lo = int'(img[r][c]) + th < mn;
    if (hi || lo) val = (nb[3] + nb[4]) / 2;
  endtask

  task automatic run(input int R, input int C, input int RS, input int th, input logic gorg,
                     input int defect_pct);
    longint t0, t1, expect_cyc;
    int strips, step, top, v;
    logic hi, lo, g;
    // image: smooth ramp per colour plane plus noise, with hot and cold defects
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        v = 300 + ((r * 7 + c * 3) % 200) + int'($urandom_range(0, 40));
        if (int'($urandom_range(0, 99)) < defect_pct)
          v = ($urandom_range(0, 1) == 1) ? 1000 + int'($urandom_range(0, 23)) : int'($urandom_range(0, 30));
        img[r][c] = pixel_t'(v);
        wcount[r][c] = 0;
      end
    strips = 1; top = 0; step = RS - 4;
    while (top + RS < R) begin
      strips++;
      if (top + step + RS > R) begin top = R - RS; n_moved++; end
      else top = top + step;
    end
    if (strips > 1) n_multi++;
    expect_cyc = longint'(strips) * RS * (C + 2) + 2 * RS + 13;

    @(negedge clk);
    img_rows = coord_t'(R); img_cols = coord_t'(C); strip_rows = 7'(RS);
    thresh = pixel_t'(th); green_origin = gorg; start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    check(t1 - t0 == expect_cyc,
          $sformatf("R=%0d C=%0d RS=%0d cycles %0d expected %0d", R, C, RS, t1 - t0, expect_cyc));
    $display("run R=%0d C=%0d RS=%0d: %0d strips, %0d cycles, %.4f cycles/pixel",
             R, C, RS, strips, t1 - t0, real'(t1 - t0) / real'(R * C));
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        model(R, C, r, c, th, gorg, v, hi, lo, g);
        check(wcount[r][c] == 1, $sformatf("pixel (%0d,%0d) written %0d times", r, c, wcount[r][c]));
        check(int'(outimg[r][c]) == v,
              $sformatf("pixel (%0d,%0d) = %0d expected %0d (in %0d)", r, c, outimg[r][c], v, img[r][c]));
        check(flag_hi[r][c] == hi && flag_lo[r][c] == lo,
              $sformatf("pixel (%0d,%0d) flags %b%b expected %b%b", r, c,
                        flag_hi[r][c], flag_lo[r][c], hi, lo));
        if (hi && g) n_hi_g++;
        if (hi && !g) n_hi_rb++;
        if (lo && g) n_lo_g++;
        if (lo && !g) n_lo_rb++;
        if (r < 2 || r >= R - 2 || c < 2 || c >= C - 2) n_copied++;
        if (th > 0 && !hi && !lo && (r >= 2 && r < R - 2 && c >= 2 && c < C - 2)) begin
          int dummy; logic h0, l0, g0;
          model(R, C, r, c, 0, gorg, dummy, h0, l0, g0);
          if (h0 || l0) n_thresh_kept++;
        end
      end
  endtask

  initial begin
    start = 0; img_rows = '0; img_cols = '0; strip_rows = '0; thresh = '0; green_origin = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32, 8, 8, 0, 1'b1, 5);        // small reference size: 8 columns, 32 rows, strips of 8
    run(164, 104, 8, 0, 1'b1, 3);     // large reference size, strips of 8
    run(164, 104, 69, 0, 1'b1, 3);    // largest strip for 64-entry RAMs (64 + N)
    run(50, 21, 12, 0, 1'b0, 6);      // last strip moved up; red/blue at origin
    run(40, 30, 16, 25, 1'b1, 6);     // detection margin
    check(n_hi_g > 0,  "no hi defect on a green centre");
    check(n_hi_rb > 0, "no hi defect on a red/blue centre");
    check(n_lo_g > 0,  "no lo defect on a green centre");
    check(n_lo_rb > 0, "no lo defect on a red/blue centre");
    check(n_multi > 0, "no multi-strip image");
    check(n_moved > 0, "no moved last strip");
    check(n_copied > 0, "no border copy");
    check(n_thresh_kept > 0, "threshold never kept a pixel");
    $display("mechanisms: hi_g=%0d hi_rb=%0d lo_g=%0d lo_rb=%0d multi=%0d moved=%0d copied=%0d thresh_kept=%0d",
             n_hi_g, n_hi_rb, n_lo_g, n_lo_rb, n_multi, n_moved, n_copied, n_thresh_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
