// defect_replace: final decision of the median defect-correction filter.
//
// A centre pixel brighter than the largest of its 8 same-colour neighbours, or darker than
// the smallest, is taken to be a sensor defect. It is then replaced by the median of the
// neighbours. With 8 neighbours the median is the mean of the two middle values, ranks 4
// and 5, computed as (r4 + r5) >> 1. Otherwise the centre passes through unchanged. The
// comparison, the replacement by the mean of the middle pair and the truncating shift follow
// the filter's description. The margin thresh widens the accepted range: a pixel counts as a
// defect only if it lies more than thresh outside min..max. thresh = 0 gives the plain rule
// of the filter's description; the margin is this design's addition. When filter is low the
// window is incomplete (an image or strip border), and the centre is copied.
//
// One register stage, updated on every enabled clock edge. is_hi/is_lo report which rule
// replaced the pixel, in the same cycle as pix_out.
module defect_replace #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         filter,
  input  logic [W-1:0] center,
  input  logic [W-1:0] nmax,
  input  logic [W-1:0] nmin,
  input  logic [W-1:0] mid_a,     // rank 4 of 8 (upper middle)
  input  logic [W-1:0] mid_b,     // rank 5 of 8 (lower middle)
  input  logic [W-1:0] thresh,
  output logic [W-1:0] pix_out,
  output logic         is_hi,
  output logic         is_lo
);
  logic         hi, lo;
  logic [W:0]   mean2;

  always_comb begin
    hi    = {1'b0, center} > ({1'b0, nmax} + {1'b0, thresh});
    lo    = ({1'b0, center} + {1'b0, thresh}) < {1'b0, nmin};
    mean2 = {1'b0, mid_a} + {1'b0, mid_b};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pix_out <= '0;
      is_hi   <= 1'b0;
      is_lo   <= 1'b0;
    end else if (en) begin
      is_hi   <= filter && hi;
      is_lo   <= filter && lo;
      pix_out <= (filter && (hi || lo)) ? mean2[W:1] : center;
    end
  end
endmodule
