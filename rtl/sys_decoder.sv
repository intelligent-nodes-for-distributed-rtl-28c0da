// sys_decoder: system decoder (DC) of the intelligent node.
//
// Turns the full 16-bit MCU address ({P2, latched P0}) into one select line
// per target of the node's memory map (see in_node_pkg): the external RAM and,
// inside it, the write-protected code range; the expansion-board page
// 8000-80FF; the six BIOP registers; and the two program-switch addresses
// C040 and C080. All addresses are fully decoded, so no target answers at an
// alias; this, and the BIOP placement, are this design's choices.
//
// Purely combinational; the selects are qualified with the bus strobes by the
// blocks that use them.
module sys_decoder
  import in_node_pkg::*;
#(
  parameter logic [15:0] CODE_TOP = CODE_TOP_DEFAULT  // first data address in RAM
) (
  input  logic [15:0] addr,
  output dec_sel_t    sel
);

  always_comb begin
    sel          = '0;
    sel.ram      = (addr < RAM_TOP);
    sel.code     = (addr < CODE_TOP);
    sel.exp      = (addr[15:8] == EXP_PAGE);
    sel.sw_ext   = (addr == SW_EXT_ADR);
    sel.sw_int   = (addr == SW_INT_ADR);
    for (int i = 0; i < N_BIOP_OUT; i++) sel.biop_out[i] = (addr == BIOP_OUT_ADR[i]);
    for (int i = 0; i < N_BIOP_IN;  i++) sel.biop_in[i]  = (addr == BIOP_IN_ADR[i]);
  end

endmodule
