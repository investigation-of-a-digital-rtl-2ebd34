// tb_column_buffer: checks that the column buffer is a serial-in, parallel-out register
// chain: q[k] equals the sample entered k+1 enabled cycles earlier, and a low enable holds
// all registers. The expected values come from a history list kept by the testbench.
module tb_column_buffer;
  localparam int N = 5, W = 10;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q [N];
  always #5 clk = ~clk;
  column_buffer #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      en = ($urandom_range(0, 3) != 0);
      d  = W'($urandom);
      @(posedge clk);
      if (en) hist.push_front(d);
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        if (hist.size() > k) begin
          checks++;
          if (q[k] !== hist[k]) begin
            failures++;
            $display("FAIL t=%0d q[%0d]=%0d expected %0d", t, k, q[k], hist[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
