// tb_bayer_window_select: checks the neighbour choice for green and red/blue centres. Each
// window register gets a distinct value that encodes its row and column offset from the
// centre, so the testbench can check that the 8 neighbours are exactly the diamond (green)
// or the square (red/blue) of same-colour pixels, in any order, and that the centre is right.
module tb_bayer_window_select;
  import median_pkg::*;
  pixel_t win [FILT_N][FILT_N];
  logic   green;
  pixel_t center;
  pixel_t neigh [NEIGH];
  bayer_window_select dut (.*);

  int checks = 0, failures = 0;

  // value of the pixel at row offset dr (south positive) and column offset dc (east positive)
  function automatic pixel_t code(input int dr, input int dc, input int base);
    return pixel_t'(base + (dr + 2) * 5 + (dc + 2));
  endfunction

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      int base;
      int exp_dr[8], exp_dc[8];
      base = int'($urandom_range(0, 900));
      green = trial[0];
      // win[c][r]: c columns west of east edge, r rows north of south edge
      for (int c = 0; c < 5; c++)
        for (int r = 0; r < 5; r++)
          win[c][r] = code(2 - r, 2 - c, base);
      #1;
      checks++;
      if (center !== code(0, 0, base)) begin failures++; $display("FAIL centre"); end
      if (green) begin
        exp_dr = '{-2, 2, 0, 0, -1, -1, 1, 1};
        exp_dc = '{0, 0, -2, 2, -1, 1, -1, 1};
      end else begin
        exp_dr = '{-2, 2, 0, 0, -2, -2, 2, 2};
        exp_dc = '{0, 0, -2, 2, -2, 2, -2, 2};
      end
      for (int e = 0; e < 8; e++) begin
        int hits;
        hits = 0;
        for (int k = 0; k < 8; k++) if (neigh[k] == code(exp_dr[e], exp_dc[e], base)) hits++;
        checks++;
        if (hits != 1) begin
          failures++;
          $display("FAIL green=%0b neighbour (%0d,%0d) found %0d times", green, exp_dr[e], exp_dc[e], hits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
