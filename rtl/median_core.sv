// median_core: the datapath of the Bayer median defect-correction filter.
//
// One raw sample enters per enabled cycle, in the strip column-major order of
// strip_sequencer. A 5x5 window_pipeline exposes the whole filter window every cycle. The
// caller says, with green and tag_in, which image pixel sits at the window centre in that
// cycle. bayer_window_select picks the centre and its 8 same-colour neighbours: a diamond for
// green, a square for red/blue. The neighbours then go through one shared 8-stage pruned
// insertion sort, one neighbour per stage. Neighbour k waits k-1 cycles in skew registers
// before its stage. defect_replace then keeps the centre or replaces it with the median.
// The colour alternates every cycle, so the sort stages serve green and red/blue pixels in
// turn.
//
// The input pipeline, the colour-dependent windows, the pruned insertion sort and the
// replacement rule follow the filter's description. That description shares only the sort
// stages that line up in its datapath, and keeps separate green and red/blue stages
// elsewhere. Here every stage is shared, and a multiplexer in front of the sort picks each
// colour's neighbours. That is this design's choice. The description names it as its
// fully shared option.
//
// Timing: the centre that is in the window in cycle c (the sample entered 2*strip_rows+3
// enabled cycles earlier) leaves on pix_out, with its tag on tag_out, CORE_LAT = 9 enabled
// cycles later. strip_rows as for window_pipeline.
module median_core
  import median_pkg::*;
#(
  parameter int unsigned DEPTH = 64,   // entries of each shift RAM (max strip = DEPTH+N+1)
  localparam int unsigned SW   = $clog2(DEPTH + FILT_N + 2),
  localparam int unsigned LW   = NEIGH / 2 + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [SW-1:0] strip_rows,
  input  pixel_t        thresh,
  input  pixel_t        din,
  input  logic          green,
  input  tag_t          tag_in,
  output pixel_t        pix_out,
  output tag_t          tag_out,
  output logic          is_hi,
  output logic          is_lo
);
  pixel_t win [FILT_N][FILT_N];
  pixel_t center;
  pixel_t neigh [NEIGH];

  window_pipeline #(.N(FILT_N), .W(PIX_W), .DEPTH(DEPTH)) u_win (
    .clk, .rst_n, .clr, .en, .strip_rows, .din, .win
  );

  bayer_window_select u_sel (.win, .green, .center, .neigh);

  // Sorting pipeline: stage s (1..NEIGH) inserts neighbour s-1. pend[s] carries the
  // neighbours not yet inserted, the centre and the tag alongside the sort state.
  pixel_t lst  [NEIGH+1][LW];
  pixel_t mx   [NEIGH+1];
  pixel_t mn   [NEIGH+1];
  pixel_t pend [NEIGH+1][NEIGH];
  pixel_t ctr  [NEIGH+1];
  tag_t   tg   [NEIGH+1];

  always_comb begin
    for (int j = 0; j < LW; j++) lst[0][j] = '0;
    mx[0]   = '0;
    mn[0]   = '0;
    pend[0] = neigh;
    ctr[0]  = center;
    tg[0]   = tag_in;
  end

  for (genvar s = 1; s <= NEIGH; s++) begin : g_sort
    insertion_sort_stage #(.K(s), .TOTAL(NEIGH), .W(PIX_W)) u_stage (
      .clk, .rst_n, .en,
      .in_list(lst[s-1]), .in_max(mx[s-1]), .in_min(mn[s-1]), .v(pend[s-1][s-1]),
      .out_list(lst[s]), .out_max(mx[s]), .out_min(mn[s])
    );
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int j = 0; j < NEIGH; j++) pend[s][j] <= '0;
        ctr[s] <= '0;
        tg[s]  <= '0;
      end else if (en) begin
        pend[s] <= pend[s-1];
        ctr[s]  <= ctr[s-1];
        tg[s]   <= tg[s-1];
      end
    end
  end

  // After the last stage the list holds ranks 4 and 5 of 8 in slots 0 and 1.
  defect_replace #(.W(PIX_W)) u_dec (
    .clk, .rst_n, .en, .filter(tg[NEIGH].filter), .center(ctr[NEIGH]),
    .nmax(mx[NEIGH]), .nmin(mn[NEIGH]), .mid_a(lst[NEIGH][0]), .mid_b(lst[NEIGH][1]),
    .thresh, .pix_out, .is_hi, .is_lo
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  tag_out <= '0;
    else if (en) tag_out <= tg[NEIGH];
  end
endmodule
