// shift_ram: a small RAM used as a shift register of programmable length.
//
// It sits between two column buffers of the window pipeline and holds each sample until the
// window has moved one column on. Its length is the strip height minus the filter height.
// Each enabled cycle it reads the entry at a rotating address into the output register and
// writes the new sample into the same entry. The address wraps after len-1 entries, so the
// output register adds the last cycle of delay. A sample written at enabled cycle t therefore
// appears on dout after enabled cycle t+len-1, that is, len enabled cycles later. Using a RAM
// with a rotating address as a shift register follows the window-pipeline method, and so does
// the 64-entry default depth. The registered read port and the len >= 2 limit are this
// design's choices.
//
// Interface: len must hold still while en is high, and 2 <= len <= DEPTH+1. clr resets the
// address (and the output register) so that a new delay length starts cleanly.
module shift_ram #(
  parameter int unsigned DEPTH = 64,  // RAM entries
  parameter int unsigned W     = 10,  // sample width
  localparam int unsigned AW   = $clog2(DEPTH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [AW-1:0] len,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr <= '0;
    end else if (clr) begin
      addr <= '0;
    end else if (en) begin
      addr <= (addr + 1'b1 >= len - 1'b1) ? '0 : addr + 1'b1;
    end
  end

  // RAM: read-before-write on one address, registered read data.
  always_ff @(posedge clk) begin
    if (en && !clr) begin
      dout      <= mem[addr[$clog2(DEPTH)-1:0]];
      mem[addr[$clog2(DEPTH)-1:0]] <= din;
    end else if (clr) begin
      dout <= '0;
    end
  end

  // Length must fit the RAM; checked while the RAM is shifting.
  assert property (@(posedge clk) disable iff (!rst_n) en |-> (32'(len) >= 2 && 32'(len) <= DEPTH + 1))
    else $error("shift_ram: len %0d outside 2..%0d", len, DEPTH + 1);
endmodule
