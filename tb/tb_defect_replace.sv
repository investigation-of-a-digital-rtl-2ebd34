// tb_defect_replace: checks the replacement decision with random and corner-case inputs.
// Expected: when filter is high and centre > max + thresh (hi) or centre + thresh < min
// (lo), the output is floor((mid_a + mid_b) / 2); otherwise the centre is copied. Includes
// full-scale values, so that carry-out in the mean and in the threshold sums is exercised.
// Checks the one-cycle latency and the hold on a low enable.
module tb_defect_replace;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, en = 0, filter = 0;
  logic [W-1:0] center = '0, nmax = '0, nmin = '0, mid_a = '0, mid_b = '0, thresh = '0;
  logic [W-1:0] pix_out;
  logic is_hi, is_lo;
  always #5 clk = ~clk;
  defect_replace #(.W(W)) dut (.*);

  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  initial begin
    int e_pix; logic e_hi, e_lo;
    logic [W-1:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int a, b, c, d;
      a = int'($urandom_range(0, 1023)); b = int'($urandom_range(0, 1023));
      if (t % 4 == 0) begin a = 1023; b = 1023 - int'($urandom_range(0, 3)); end
      nmax  = W'(a > b ? a : b);
      nmin  = W'(a > b ? b : a);
      c = int'($urandom_range(int'(nmin), int'(nmax)));
      d = int'($urandom_range(int'(nmin), int'(nmax)));
      mid_a = W'(c > d ? c : d);
      mid_b = W'(c > d ? d : c);
      center = W'($urandom_range(0, 1023));
      thresh = (t % 2 == 0) ? '0 : W'($urandom_range(0, 60));
      filter = ($urandom_range(0, 7) != 0);
      en = 1;
      e_hi = filter && (int'(center) > int'(nmax) + int'(thresh));
      e_lo = filter && (int'(center) + int'(thresh) < int'(nmin));
      e_pix = (e_hi || e_lo) ? (int'(mid_a) + int'(mid_b)) / 2 : int'(center);
      @(negedge clk);
      checks++;
      if (int'(pix_out) != e_pix || is_hi != e_hi || is_lo != e_lo) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d max=%0d min=%0d th=%0d f=%0b: %0d %b%b exp %0d %b%b",
          center, nmax, nmin, thresh, filter, pix_out, is_hi, is_lo, e_pix, e_hi, e_lo);
      end
      if (e_hi) n_hi++;
      if (e_lo) n_lo++;
      // hold with enable low
      held = pix_out;
      en = 0; center = ~center;
      @(negedge clk);
      checks++;
      if (pix_out != held) begin failures++; $display("FAIL hold"); end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL no hi or lo case"); end
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
