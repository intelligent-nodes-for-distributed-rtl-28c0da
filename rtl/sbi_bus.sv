// sbi_bus: system bus interface (SBI) with its bus former (CD).
//
// Expansion boards (measuring MB, control CB, interface IB) sit on a small
// bus of their own: buffered data DAT0..7, low address A0..7, and the
// strobes EWR and ERD, plus clock, NMI, IRQ and timer lines that the top
// level wires straight through. This block produces the strobes and steers
// the data buffer:
//   * EWR / ERD (active low) follow the MCU's WR / RD only while the address
//     lies in the expansion page 8000-80FF;
//   * during EWR the buffer drives the MCU data byte onto DAT (dat_oe high);
//   * during ERD it passes DAT back to the MCU data bus (dout_en high).
// A0..7 go to the boards straight from the address register (wired in the
// top level). The signal set follows the board description; the buffer direction
// rule is the usual one for a bidirectional bus transceiver.
//
// Purely combinational.
module sbi_bus
  import in_node_pkg::*;
(
  input  logic              sel_exp,
  input  logic              rd_n,
  input  logic              wr_n,
  input  logic [DATA_W-1:0] din,        // MCU data byte (P0)
  input  logic [DATA_W-1:0] dat_in,     // DAT0..7 from the boards
  output logic              ewr_n,
  output logic              erd_n,
  output logic [DATA_W-1:0] dat_out,    // DAT0..7 to the boards
  output logic              dat_oe,
  output logic [DATA_W-1:0] dout,       // to the MCU data bus
  output logic              dout_en
);

  always_comb begin
    ewr_n   = !(sel_exp && !wr_n);
    erd_n   = !(sel_exp && !rd_n);
    dat_oe  = !ewr_n;
    dat_out = dat_oe ? din : '0;
    dout_en = !erd_n;
    dout    = dout_en ? dat_in : '0;
  end

endmodule
