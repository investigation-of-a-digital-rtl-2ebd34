// tb_strip_sequencer: checks the strip walk and the edge policy against an independent
// enumeration. For each image size the testbench lists the expected positions: strips of
// strip_rows rows stepping by strip_rows-4, the last strip moved up to the last row,
// column-major inside a strip, two flush columns per strip. It compares row, column,
// in_image, filter and write each cycle, and checks at_end on the final position. It also
// checks that the written positions wcnt every pixel exactly once, and that filter marks
// exactly the pixels at least two rows and columns from the image border. Random stall
// cycles (en low) must hold the position. The first/last strip flags are checked as well.
module tb_strip_sequencer;
  import median_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  coord_t img_rows = '0, img_cols = '0;
  logic [6:0] strip_rows = '0;
  logic active, in_image, filter, write, first_strip, last_strip, at_end;
  coord_t row, col;
  always #5 clk = ~clk;
  strip_sequencer #(.N(5), .SW(7)) dut (.*);

  int checks = 0, failures = 0, n_moved = 0, n_multi = 0;

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(input int R, input int C, input int RS);
    int top, lo_row, wcnt [int];
    logic last;
    @(negedge clk);
    img_rows = coord_t'(R); img_cols = coord_t'(C); strip_rows = 7'(RS); start = 1;
    @(negedge clk);
    start = 0;
    top = 0; lo_row = 0;
    forever begin
      last = (top + RS >= R);
      for (int j = 0; j < C + 2; j++)
        for (int i = 0; i < RS; i++) begin
          int g; logic e_w, e_f;
          g = top + i;
          e_f = (i >= 2 && i < RS - 2 && j >= 2 && j < C - 2);
          e_w = (j < C) && (g >= lo_row) && (i < RS - 2 || last);
          en = ($urandom_range(0, 4) != 0);
          while (!en) begin
            @(negedge clk);
            en = ($urandom_range(0, 4) != 0);
          end
          chk(active && int'(row) == g && int'(col) == j,
              $sformatf("R%0d C%0d RS%0d pos (%0d,%0d) exp (%0d,%0d)", R, C, RS, row, col, g, j));
          chk(in_image == (j < C) && filter == e_f && write == e_w,
              $sformatf("flags at (%0d,%0d): img %b f %b w %b exp %b %b %b", g, j, in_image, filter, write, j < C, e_f, e_w));
          chk(at_end == (last && i == RS - 1 && j == C + 1), "at_end");
          chk(first_strip == (top == 0) && last_strip == last, "first/last strip flags");
          if (e_w) begin
            wcnt[g * 4096 + j] = wcnt.exists(g * 4096 + j) ? wcnt[g * 4096 + j] + 1 : 1;
            chk(e_f == (g >= 2 && g < R - 2 && j >= 2 && j < C - 2), "filter region");
          end
          @(negedge clk);
        end
      if (last) break;
      lo_row = top + RS - 2;
      if (top + RS - 4 + RS > R) begin top = R - RS; n_moved++; end
      else top = top + RS - 4;
      n_multi++;
    end
    en = 1;
    chk(!active, "active after end");
    chk(wcnt.size() == R * C, $sformatf("coverage %0d of %0d", wcnt.size(), R * C));
    foreach (wcnt[k]) chk(wcnt[k] == 1, "pixel written twice");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(32, 8, 8);
    run(20, 7, 9);
    run(12, 5, 12);
    run(75, 6, 69);
    run(41, 4, 10);
    chk(n_moved > 0 && n_multi > 0, "moved/multi strip never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
