// column_buffer: one column of a sliding filter window.
//
// N registers are loaded serially, one sample per enabled cycle, and read out in parallel.
// q[0] holds the newest sample and q[N-1] the oldest, so when samples arrive down a column,
// q[0] is the bottom pixel of the window column and q[N-1] the top one. The register chain
// follows the column buffer of the window-pipeline method. The enable and the reset to 0
// are this design's choices.
//
// Timing: q[k] at a clock edge takes the value d had k+1 enabled edges earlier.
module column_buffer #(
  parameter int unsigned N = 5,   // window height
  parameter int unsigned W = 10   // sample width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q [N]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) q[k] <= '0;
    end else if (en) begin
      q[0] <= d;
      for (int k = 1; k < N; k++) q[k] <= q[k-1];
    end
  end
endmodule
