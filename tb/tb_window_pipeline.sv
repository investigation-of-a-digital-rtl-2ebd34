// tb_window_pipeline: checks the NxN input pipeline. A numbered sample stream is fed with
// random idle cycles. After every enabled cycle each window register win[c][r] must hold the
// sample entered r + c*strip_rows enabled cycles before the newest one. That is, the window
// covers N consecutive rows of N columns of a column-major strip. The 5x5 pipeline of the
// median filter is run with strips of 8 and 69 rows (the largest a 64-entry RAM allows). A
// 3x3 pipeline, the size of the method's worked example, is run with strips of 10 rows.
module tb_window_pipeline;
  localparam int W = 10, DEPTH = 64;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  always #5 clk = ~clk;

  logic [6:0] rs5 = 7'd8, rs3 = 7'd10;
  logic [W-1:0] din = '0;
  logic [W-1:0] win5 [5][5];
  logic [W-1:0] win3 [3][3];

  window_pipeline #(.N(5), .W(W), .DEPTH(DEPTH)) dut5 (
    .clk, .rst_n, .clr, .en, .strip_rows(rs5), .din, .win(win5));
  window_pipeline #(.N(3), .W(W), .DEPTH(DEPTH)) dut3 (
    .clk, .rst_n, .clr, .en, .strip_rows(rs3), .din, .win(win3));

  int checks = 0, failures = 0;

  task automatic run(input int rs, input int cycles);
    logic [W-1:0] hist [$];
    rs5 = 7'(rs);
    clr = 1; @(negedge clk); clr = 0;
    for (int t = 0; t < cycles; t++) begin
      en  = ($urandom_range(0, 5) != 0);
      din = W'($urandom);
      @(posedge clk);
      if (en) hist.push_front(din);
      @(negedge clk);
      for (int c = 0; c < 5; c++)
        for (int r = 0; r < 5; r++)
          if (hist.size() > r + c * rs) begin
            checks++;
            if (win5[c][r] !== hist[r + c * rs]) begin
              failures++;
              if (failures < 10) $display("FAIL N=5 rs=%0d win[%0d][%0d]=%0d exp %0d", rs, c, r, win5[c][r], hist[r + c*rs]);
            end
          end
      for (int c = 0; c < 3; c++)
        for (int r = 0; r < 3; r++)
          if (hist.size() > r + c * 10) begin
            checks++;
            if (win3[c][r] !== hist[r + c * 10]) begin
              failures++;
              if (failures < 10) $display("FAIL N=3 win[%0d][%0d]=%0d exp %0d", c, r, win3[c][r], hist[r + c*10]);
            end
          end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8, 300);
    run(69, 600);
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
