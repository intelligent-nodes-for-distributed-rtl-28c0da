// irq_ctrl: interrupt circuit (IC) of the intelligent node.
//
// The non-maskable request goes straight to INT0 (outside this block); all
// other requests are collected here and share INT1. The MCU learns which
// source interrupted by reading the source number on port P1.
//
// Each request input is edge-captured into a pending bit (a rising edge sets
// it). INT1 (active low) is asserted while any bit is pending; src_id shows
// the pending source with the lowest number, which has the highest priority.
// The interrupt routine acknowledges the source it has served with a rising
// edge on ack (a P1 output bit); that clears the pending bit named by src_id,
// and INT1 stays low if other requests remain. A request edge in the same
// clock as the acknowledge of its own source is kept.
// The board description gives INT1 and identification through P1; edge
// capture, fixed priority and the acknowledge bit are this design's choices.
module irq_ctrl #(
  parameter int unsigned N_SRC = 4,
  localparam int unsigned IDW  = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] req,
  input  logic             ack,
  output logic             int1_n,
  output logic [IDW-1:0]   src_id,
  output logic [N_SRC-1:0] pending
);

  logic [N_SRC-1:0] req_d, clr;
  logic             ack_d;

  always_comb begin
    src_id = '0;
    for (int i = N_SRC - 1; i >= 0; i--)
      if (pending[i]) src_id = IDW'(i);
  end

  always_comb begin
    clr = '0;
    if (ack && !ack_d && (pending != '0)) clr[src_id] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_d   <= '0;
      ack_d   <= 1'b0;
      pending <= '0;
    end else begin
      req_d   <= req;
      ack_d   <= ack;
      pending <= (pending & ~clr) | (req & ~req_d);
    end
  end

  assign int1_n = (pending == '0);

endmodule
