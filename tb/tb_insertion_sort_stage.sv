// tb_insertion_sort_stage: checks every stage of the pruned insertion sort. Stages K = 1..8
// are chained as in the median datapath, and each stage K takes value K-1 of an 8-value
// set, delayed K-1 cycles. A new random set, often with repeated values, enters every enabled
// cycle. After each edge, every stage's max, min and kept ranks LO..HI are compared with a
// full sort of the first K values of the set it holds. Random idle cycles check the enable.
module tb_insertion_sort_stage;
  localparam int W = 10, T = 8, LW = T / 2 + 1;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [W-1:0] lst [T+1][LW];
  logic [W-1:0] mx [T+1], mn [T+1];
  logic [W-1:0] vin [T+1];     // value fed to stage k (index k)

  for (genvar k = 1; k <= T; k++) begin : g
    insertion_sort_stage #(.K(k), .TOTAL(T), .W(W)) u (
      .clk, .rst_n, .en, .in_list(lst[k-1]), .in_max(mx[k-1]), .in_min(mn[k-1]),
      .v(vin[k]), .out_list(lst[k]), .out_max(mx[k]), .out_min(mn[k]));
  end
  always_comb begin
    for (int j = 0; j < LW; j++) lst[0][j] = '0;
    mx[0] = '0; mn[0] = '0;
  end

  typedef logic [W-1:0] set_t [T];
  set_t sets [$];           // sets[0] newest
  int checks = 0, failures = 0;

  function automatic int lo_of(int k); int l = T/2 - (T - k); return l > 1 ? l : 1; endfunction
  function automatic int hi_of(int k); return k < T/2 + 1 ? k : T/2 + 1; endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      set_t s;
      en = ($urandom_range(0, 5) != 0);
      for (int i = 0; i < T; i++)
        s[i] = (t % 3 == 0) ? W'($urandom_range(0, 7)) : W'($urandom);
      // drive stage inputs: stage k gets value k-1 of the set that entered k-1 enabled cycles ago
      if (en) sets.push_front(s);
      for (int k = 1; k <= T; k++)
        vin[k] = (sets.size() >= k) ? sets[k-1][k-1] : '0;
      @(posedge clk);
      @(negedge clk);
      // after an enabled edge stage k holds set sets[k-1] (as pushed at that edge)
      if (en) for (int k = 1; k <= T; k++) begin
        if (sets.size() >= k) begin
          int v[$];
          v.delete();
          for (int i = 0; i < k; i++) v.push_back(int'(sets[k-1][i]));
          v.rsort();
          checks++;
          if (mx[k] != W'(v[0]) || mn[k] != W'(v[k-1])) begin
            failures++;
            if (failures < 10) $display("FAIL K=%0d max/min %0d/%0d exp %0d/%0d", k, mx[k], mn[k], v[0], v[k-1]);
          end
          for (int r = lo_of(k); r <= hi_of(k); r++) begin
            checks++;
            if (lst[k][r - lo_of(k)] != W'(v[r-1])) begin
              failures++;
              if (failures < 10) $display("FAIL K=%0d rank %0d = %0d exp %0d", k, r, lst[k][r-lo_of(k)], v[r-1]);
            end
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
