// reset_ctrl: microcomputer reset circuit (Res) of the intelligent node.
//
// Two outputs:
//   * board_rst_n, the reset of the node's own logic: asserted at once while
//     por_n (power-up / reset button) is low, released synchronously two
//     clocks after por_n goes high.
//   * mcu_rst, the active-high RST pin of the 89C51: held while the board is
//     in reset and for RST_CYCLES clocks afterwards, and pulsed for RST_CYCLES
//     clocks whenever the program trigger requests a restart.
// RST_CYCLES defaults to 24 oscillator periods, the two machine cycles an
// 8051-family part needs on RST. The circuit is only named on the board; the
// counter realisation and the restart input are this design's choices.
// board_rst_n comes from a flop that is itself asynchronously cleared by
// por_n: this is the usual reset synchroniser (asserted asynchronously,
// released synchronously), so a lint note about a net used both as data and
// as an asynchronous reset is expected here.
module reset_ctrl #(
  parameter int unsigned RST_CYCLES = 24
) (
  input  logic clk,
  input  logic por_n,
  input  logic restart,
  output logic board_rst_n,
  output logic mcu_rst
);

  localparam int unsigned CW = $clog2(RST_CYCLES + 1);

  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) sync <= 2'b00;
    else        sync <= {sync[0], 1'b1};
  end

  assign board_rst_n = sync[1];

  always_ff @(posedge clk or negedge board_rst_n) begin
    if (!board_rst_n)  cnt <= CW'(RST_CYCLES);
    else if (restart)  cnt <= CW'(RST_CYCLES);
    else if (cnt != 0) cnt <= cnt - 1'b1;
  end

  assign mcu_rst = !board_rst_n || (cnt != 0);

endmodule
