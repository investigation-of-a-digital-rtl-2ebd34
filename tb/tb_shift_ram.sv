// tb_shift_ram: checks the RAM-based shift register for several lengths, including the
// 64-entry maximum (length 65 with the output register). With a length L, the sample entered
// on an enabled cycle must appear on dout L enabled cycles later; idle cycles must not move
// data. Expected values come from a history list of the entered samples. clr restarts
// the delay line between lengths.
module tb_shift_ram;
  localparam int DEPTH = 64, W = 10;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [6:0] len = 7'd2;
  logic [W-1:0] din = '0, dout;
  always #5 clk = ~clk;
  shift_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int lens [5] = '{2, 3, 11, 59, 65};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (lens[li]) begin
      logic [W-1:0] hist [$];
      hist.delete();
      len = 7'(lens[li]);
      clr = 1; @(negedge clk); clr = 0;
      for (int t = 0; t < 400; t++) begin
        en  = ($urandom_range(0, 4) != 0);
        din = W'($urandom);
        @(posedge clk);
        if (en) hist.push_front(din);
        @(negedge clk);
        // dout now holds the sample entered len enabled edges before the newest one + 1
        if (en && hist.size() >= lens[li]) begin
          checks++;
          if (dout !== hist[lens[li] - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL len=%0d t=%0d dout=%0d expected %0d", lens[li], t, dout, hist[lens[li]-1]);
          end
        end
      end
    end
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
