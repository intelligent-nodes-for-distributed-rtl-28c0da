// ram_ctrl: RAM control circuit (CS) of the intelligent node.
//
// The node keeps both the loaded routine and its data in one external RAM.
// This block decides which MCU strobes reach that RAM:
//   * WR (MOVX write) reaches the RAM at any RAM address while the loader in
//     internal ROM runs (remote reconfiguration), but is blocked in the code
//     range 0000..CODE_TOP-1 while the loaded routine runs from external RAM;
//     a blocked write is reported on wr_blocked for one strobe.
//   * RD (MOVX read) reaches the RAM in both modes.
//   * PSEN (code fetch) reaches the RAM only while the loaded routine runs.
// The gating rules follow the board description; reporting a blocked write
// is this design's addition for observability.
//
// Purely combinational; strobes are active low as on the 89C51 pins.
module ram_ctrl
  import in_node_pkg::*;
(
  input  prog_mode_e mode,
  input  logic       sel_ram,    // address inside the RAM
  input  logic       sel_code,   // address inside the code range
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic       psen_n,
  output logic       ram_ce_n,
  output logic       ram_oe_n,
  output logic       ram_we_n,
  output logic       wr_blocked
);

  logic ext, rd, wr, fetch, we, oe;

  always_comb begin
    ext        = (mode == MODE_EXTERNAL);
    rd         = !rd_n;
    wr         = !wr_n;
    fetch      = !psen_n && ext;
    we         = sel_ram && wr && !(sel_code && ext);
    oe         = sel_ram && (rd || fetch);
    wr_blocked = sel_ram && wr && sel_code && ext;
    ram_we_n   = !we;
    ram_oe_n   = !oe;
    ram_ce_n   = !(we || oe);
  end

  // The loaded routine must never be able to overwrite itself.
  always_comb begin
    assert (!(!ram_we_n && sel_code && ext))
      else $error("ram_ctrl: write into code range while running from RAM");
  end

endmodule
