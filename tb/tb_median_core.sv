// tb_median_core: checks the median datapath on single strips, without the sequencers. The
// testbench streams a strip column-major, plus two flush columns, with random stall cycles.
// It drives green and tag_in for the pixel at the window centre, which is the sample entered
// 2*strip_rows+3 enabled cycles earlier. CORE_LAT = 9 enabled cycles later it compares
// pix_out, is_hi/is_lo and the returned tag with a software model. The model takes the 8
// same-colour neighbours, tests the centre against their max/min and forms the mean of the
// middle pair. Strips of 12 and 69 rows are run, with both Bayer phases and with a threshold.
module tb_median_core;
  import median_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, green = 0;
  logic [6:0] strip_rows = 7'd12;
  pixel_t thresh = '0, din = '0, pix_out;
  tag_t tag_in, tag_out;
  logic is_hi, is_lo;
  always #5 clk = ~clk;
  median_core #(.DEPTH(64)) dut (.*);

  localparam int MAXR = 70, MAXC = 12;
  pixel_t img [MAXR][MAXC];
  int checks = 0, failures = 0, n_def = 0, n_keep = 0;

  task automatic model(input int RS, input int C, input int r, input int c, input int th,
                       input logic g, output int val, output logic hi, output logic lo);
    int nb[8]; int t;
    nb[0] = img[r-2][c]; nb[1] = img[r+2][c]; nb[2] = img[r][c-2]; nb[3] = img[r][c+2];
    if (g) begin
      nb[4] = img[r-1][c-1]; nb[5] = img[r-1][c+1]; nb[6] = img[r+1][c-1]; nb[7] = img[r+1][c+1];
    end else begin
      nb[4] = img[r-2][c-2]; nb[5] = img[r-2][c+2]; nb[6] = img[r+2][c-2]; nb[7] = img[r+2][c+2];
    end
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        if (nb[j] > nb[i]) begin t = nb[i]; nb[i] = nb[j]; nb[j] = t; end
    hi = int'(img[r][c]) > nb[0] + th;
    lo = int'(img[r][c]) + th < nb[7];
    val = (hi || lo) ? (nb[3] + nb[4]) / 2 : int'(img[r][c]);
  endtask

  task automatic run(input int RS, input int C, input int th, input logic gorg);
    int total, lag, n;
    strip_rows = 7'(RS); thresh = pixel_t'(th);
    for (int r = 0; r < RS; r++)
      for (int c = 0; c < C; c++)
        img[r][c] = ($urandom_range(0, 9) == 0) ? pixel_t'($urandom_range(0, 1023))
                                                 : pixel_t'(400 + $urandom_range(0, 60));
    clr = 1; @(negedge clk); clr = 0;
    total = RS * (C + 2);
    lag = 2 * RS + 3;
    n = 0;
    while (n < total + lag + CORE_LAT + 1) begin
      int m, mo;
      en = ($urandom_range(0, 5) != 0);
      // input sample n
      din = (n < total && (n / RS) < C) ? img[n % RS][n / RS] : '0;
      // centre position m
      m = n - lag;
      tag_in = '0;
      green = 0;
      if (m >= 0 && m < total) begin
        tag_in.row = coord_t'(m % RS);
        tag_in.col = coord_t'(m / RS);
        tag_in.write = (m / RS) < C;
        tag_in.filter = (m % RS) >= 2 && (m % RS) < RS - 2 && (m / RS) >= 2 && (m / RS) < C - 2;
        green = (((m % RS) + (m / RS)) % 2 == 0) == gorg;
      end
      // output position
      mo = n - lag - CORE_LAT;
      if (en && mo >= 0 && mo < total && (mo / RS) < C) begin
        int r, c, v; logic hi, lo, g;
        r = mo % RS; c = mo / RS;
        g = ((r + c) % 2 == 0) == gorg;
        checks++;
        if (int'(tag_out.row) != r || int'(tag_out.col) != c || !tag_out.write) begin
          failures++;
          if (failures < 10) $display("FAIL tag (%0d,%0d) exp (%0d,%0d)", tag_out.row, tag_out.col, r, c);
        end
        if (r >= 2 && r < RS - 2 && c >= 2 && c < C - 2) begin
          model(RS, C, r, c, th, g, v, hi, lo);
          if (hi || lo) n_def++; else n_keep++;
        end else begin
          v = int'(img[r][c]); hi = 0; lo = 0;
        end
        checks++;
        if (int'(pix_out) != v || is_hi != hi || is_lo != lo) begin
          failures++;
          if (failures < 10) $display("FAIL RS=%0d (%0d,%0d) out %0d %b%b exp %0d %b%b", RS, r, c, pix_out, is_hi, is_lo, v, hi, lo);
        end
      end
      @(negedge clk);
      if (en) n++;
    end
    en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(12, 10, 0, 1'b1);
    run(69, 8, 0, 1'b0);
    run(16, 12, 30, 1'b1);
    checks++;
    if (n_def == 0 || n_keep == 0) begin failures++; $display("FAIL no defect or no kept pixel"); end
    $display("defects %0d kept %0d", n_def, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
