// window_pipeline: the NxN input pipeline of the sliding-window filter method.
//
// Pixels enter one per enabled cycle, in column-major order inside a horizontal processing
// strip of strip_rows rows. N column buffers hold the N columns of the window. Between two
// neighbouring column buffers a shift_ram delays each sample by strip_rows - N cycles, so a
// sample meets its left-hand neighbour of the previous column exactly strip_rows cycles
// later. After the pipeline has filled, the N*N registers hold a complete filter window
// every cycle, and every image pixel is read only once per strip. This structure is the one
// of the window-pipeline method: column buffers joined by RAM shift registers.
//
// Output: win[c][r] is the sample that entered r + c*strip_rows enabled cycles before
// win[0][0]. win[0][0] is the south-east (newest) pixel of the window and win[N-1][N-1] the
// north-west one; the window centre is win[N/2][N/2]. win[0][0] is the sample of the
// previous enabled cycle (one register).
//
// Interface: strip_rows must hold still during a run and satisfy
// N+2 <= strip_rows <= DEPTH+N+1. clr restarts the RAM address counters.
module window_pipeline #(
  parameter int unsigned N     = 5,    // filter window size
  parameter int unsigned W     = 10,   // sample width
  parameter int unsigned DEPTH = 64,   // entries of each shift RAM
  localparam int unsigned SW   = $clog2(DEPTH + N + 2),
  localparam int unsigned AW   = $clog2(DEPTH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [SW-1:0] strip_rows,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  win [N][N]
);
  logic [SW-1:0] len_full;
  logic [AW-1:0] ram_len;
  logic [W-1:0]  col_in [N];

  assign len_full = strip_rows - SW'(N);
  assign ram_len  = AW'(len_full);
  assign col_in[0] = din;

  for (genvar c = 0; c < N; c++) begin : g_col
    column_buffer #(.N(N), .W(W)) u_cb (
      .clk, .rst_n, .en, .d(col_in[c]), .q(win[c])
    );
    if (c < N - 1) begin : g_ram
      shift_ram #(.DEPTH(DEPTH), .W(W)) u_ram (
        .clk, .rst_n, .clr, .en, .len(ram_len), .din(win[c][N-1]), .dout(col_in[c+1])
      );
    end
  end
endmodule
