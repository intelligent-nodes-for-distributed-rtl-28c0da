// addr_latch: low address register (AR) of the intelligent node.
//
// The 89C51 multiplexes the low address byte and the data byte on port P0 and
// marks the address phase with ALE. This register captures P0 on every clock
// edge while ALE is high and holds the value after ALE falls, so A0..A7 stay
// valid for the whole data phase. It feeds the system decoder, the RAM and
// the expansion bus.
//
// Timing: one board-clock register; the latched address is valid from the
// first clock edge after ALE rises until the next ALE. Board reset clears it.
// The register itself follows the board description; the clocked capture in
// place of a transparent latch (the glue logic is synchronous to the board
// clock throughout) is this design's choice.
module addr_latch #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ale,
  input  logic [W-1:0] p0,
  output logic [W-1:0] a_lo
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   a_lo <= '0;
    else if (ale) a_lo <= p0;
  end

endmodule
