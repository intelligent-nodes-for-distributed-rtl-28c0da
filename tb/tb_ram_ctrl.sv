// tb_ram_ctrl: exhaustive check of the RAM control circuit.
// All 64 combinations of mode, RAM select, code select and the three strobes
// are applied; the RAM enables and the blocked-write flag are compared with
// the rules: writes anywhere in RAM while loading, never into the code range
// while running from RAM; reads always; code fetches only from RAM mode.
module tb_ram_ctrl;
  import in_node_pkg::*;
  prog_mode_e mode;
  logic sel_ram, sel_code, rd_n, wr_n, psen_n;
  logic ram_ce_n, ram_oe_n, ram_we_n, wr_blocked;
  int checks = 0, failures = 0, n_blocked = 0;

  ram_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic e_we, e_oe, e_blk;
      mode     = v[5] ? MODE_EXTERNAL : MODE_INTERNAL;
      sel_ram  = v[4];
      sel_code = v[3] & v[4];          // code range lies inside the RAM
      rd_n     = v[2];
      wr_n     = v[1];
      psen_n   = v[0];
      #1;
      e_blk = sel_ram && !wr_n && sel_code && (mode == MODE_EXTERNAL);
      e_we  = sel_ram && !wr_n && !e_blk;
      e_oe  = sel_ram && (!rd_n || (!psen_n && mode == MODE_EXTERNAL));
      checks++;
      if (ram_we_n !== !e_we || ram_oe_n !== !e_oe ||
          ram_ce_n !== !(e_we || e_oe) || wr_blocked !== e_blk) begin
        failures++;
        $display("mismatch v=%0d: ce=%b oe=%b we=%b blk=%b", v, ram_ce_n, ram_oe_n, ram_we_n, wr_blocked);
      end
      if (e_blk) n_blocked++;
    end
    checks++; if (n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
