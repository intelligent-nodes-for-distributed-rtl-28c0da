// sram_32k: the node's 32 Kbyte static RAM (a 61256-type 32K x 8 part).
//
// One array holds the routine loaded over the network (low half) and its
// data (high half). Reads are asynchronous, as on the real part: dout shows
// the addressed byte and dout_en is high while CE and OE are both low.
// Writes take effect on the board-clock edge while CE and WE are low; the
// clocked write is this design's stand-in for the part's WE-pulse write. The
// contents are not initialised, as on the real part.
module sram_32k #(
  parameter int unsigned AW = 15,   // 32 Kbyte
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  output logic          dout_en
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!ce_n && !we_n) mem[addr] <= din;
  end

  assign dout    = mem[addr];
  assign dout_en = !ce_n && !oe_n && we_n;

endmodule
