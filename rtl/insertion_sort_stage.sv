// insertion_sort_stage: stage K of a pipelined, pruned insertion sort.
//
// The median filter needs only four order statistics of its TOTAL = 8 neighbours: the
// maximum, the minimum and the two middle values (ranks 4 and 5, rank 1 being the largest).
// Values enter the sorting pipeline one per stage. After stage K, K values have been seen and
// TOTAL-K are still to come, so a value now at rank p can only end at a rank between p and
// p + (TOTAL-K). The stage keeps only the ranks that can still become one of the two middle
// values. These are ranks LO..HI, with LO = max(1, TOTAL/2 - (TOTAL-K)) and
// HI = min(K, TOTAL/2 + 1). For TOTAL = 8 it keeps ranks 1..K for K <= 5, then 2..5, 3..5
// and 4..5. Maximum and minimum are tracked in two extra registers. The pruning rule, the
// separate max/min registers and the shrinking list all follow the filter's description.
//
// Each new rank is chosen by two comparisons with the incoming value v:
//   new[r] = v > old[r-1] ? old[r-1] : (v > old[r] ? v : old[r])
// Ranks above the kept list count as +infinity and ranks below it as -infinity.
//
// Interface: list[j] holds rank LO+j, for j = 0..HI-LO; entries above HI-LO are don't-care
// and driven to 0. One register stage: the outputs update on every enabled clock edge. For
// K = 1 the list inputs are ignored.
module insertion_sort_stage #(
  parameter int unsigned K     = 1,    // values sorted after this stage (1..TOTAL)
  parameter int unsigned TOTAL = 8,    // values in the complete list
  parameter int unsigned W     = 10,   // sample width
  localparam int unsigned LW   = TOTAL / 2 + 1   // list slots (ranks 1..TOTAL/2+1 at most)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] in_list [LW],
  input  logic [W-1:0] in_max,
  input  logic [W-1:0] in_min,
  input  logic [W-1:0] v,
  output logic [W-1:0] out_list [LW],
  output logic [W-1:0] out_max,
  output logic [W-1:0] out_min
);
  localparam int MID_LO = TOTAL / 2;
  localparam int MID_HI = TOTAL / 2 + 1;
  localparam int KI     = K;
  localparam int LO     = (MID_LO - (int'(TOTAL) - KI) > 1) ? MID_LO - (int'(TOTAL) - KI) : 1;
  localparam int HI     = (KI < MID_HI) ? KI : MID_HI;
  localparam int KP     = KI - 1;                       // values seen before this stage
  localparam int LOP    = (MID_LO - (int'(TOTAL) - KP) > 1) ? MID_LO - (int'(TOTAL) - KP) : 1;
  localparam int HIP    = (KP < MID_HI) ? KP : MID_HI;

  logic [W-1:0] nxt [LW];

  // Comparison of v with old rank r: +1 above the kept list (v never greater),
  // -1 below it (v always greater), 0 inside (real comparison).
  function automatic logic v_above(input int r, input logic [W-1:0] val,
                                   input logic [W-1:0] lst [LW]);
    if (r < LOP || KP == 0) return (r > KP);            // no old value at rank r
    else if (r > HIP)       return 1'b1;
    else                    return val > lst[r - LOP];
  endfunction

  always_comb begin
    for (int j = 0; j < LW; j++) nxt[j] = '0;
    for (int r = LO; r <= HI; r++) begin
      if (r - 1 >= 1 && r - 1 >= LOP && KP > 0 && v > in_list[r - 1 - LOP])
        nxt[r - LO] = in_list[r - 1 - LOP];             // old rank r-1 moves down to r
      else if (v_above(r, v, in_list))
        nxt[r - LO] = v;                                // v lands at rank r
      else
        nxt[r - LO] = in_list[r - LOP];                 // old rank r stays
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < LW; j++) out_list[j] <= '0;
      out_max <= '0;
      out_min <= '0;
    end else if (en) begin
      out_list <= nxt;
      if (KP == 0) begin
        out_max <= v;
        out_min <= v;
      end else begin
        out_max <= (v > in_max) ? v : in_max;
        out_min <= (v < in_min) ? v : in_min;
      end
    end
  end
endmodule
